// tb_qca_adder: runs the three word lengths laid out for the adder (16, 32
// and 64 bits, all zoned) and a combinational 64-bit instance, each through
// qca_adder_exerciser: latency in clock phases (12, 20 and 36), results on a
// one-pair-per-QCA-cycle stream and on a back-to-back stream, and the
// mechanisms carry ripple, carry out and pipeline overlap.
module tb_qca_adder;
  logic clk = 0;
  logic [3:0] done;
  int c [4], f [4];
  int checks, failures;

  always #5 clk = ~clk;

  qca_adder_exerciser #(.N(16), .ZONED(1'b1)) ex16 (.clk(clk), .done(done[0]), .checks(c[0]), .failures(f[0]));
  qca_adder_exerciser #(.N(32), .ZONED(1'b1)) ex32 (.clk(clk), .done(done[1]), .checks(c[1]), .failures(f[1]));
  qca_adder_exerciser #(.N(64), .ZONED(1'b1)) ex64 (.clk(clk), .done(done[2]), .checks(c[2]), .failures(f[2]));
  qca_adder_exerciser #(.N(64), .ZONED(1'b0)) ex64c (.clk(clk), .done(done[3]), .checks(c[3]), .failures(f[3]));

  task automatic report(input int extra);
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3] + extra;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    wait (&done);
    @(posedge clk);
    report(0);
    $finish;
  end
endmodule
