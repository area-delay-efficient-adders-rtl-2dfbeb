// tb_qca_zone_delay: streams random words into delay lines of depth 3 and 1
// and into a zero-depth one, and checks each output against the word
// presented that many ticks earlier.
module tb_qca_zone_delay;
  localparam int W = 8;
  logic clk = 0;
  logic [W-1:0] d, q3, q1, q0;
  logic [W-1:0] hist [4];
  int checks = 0, failures = 0;

  qca_zone_delay #(.W(W), .DEPTH(3)) dut3 (.clk(clk), .d(d), .q(q3));
  qca_zone_delay #(.W(W), .DEPTH(1)) dut1 (.clk(clk), .d(d), .q(q1));
  qca_zone_delay #(.W(W), .DEPTH(0)) dut0 (.clk(clk), .d(d), .q(q0));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int t = 0; t < 100; t++) begin
      d = W'($urandom);
      #1;
      checks++;
      if (q0 !== d) begin failures++; $display("FAIL depth0 t=%0d", t); end
      @(posedge clk);
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = d;   // hist[k]: word captured k edges before this one
      #1;
      // After this edge q1 holds the word just presented, q3 the one from
      // two edges earlier.
      checks++;
      if (q1 !== hist[0]) begin failures++; $display("FAIL depth1 t=%0d", t); end
      if (t >= 2) begin
        checks++;
        if (q3 !== hist[2]) begin failures++; $display("FAIL depth3 t=%0d %h %h", t, q3, hist[2]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
