// tb_qca_adder_full: the adder at its default configuration (64 bits,
// zoned). Measures the latency of one worst-case addition (carry generated
// at bit 0 and propagated to the carry out), which must be 36 clock phases
// (9 QCA clock cycles), then checks 200 additions presented once per QCA
// clock cycle against integer addition.
module tb_qca_adder_full;
  import qca_pkg::*;
  localparam int N = 64;
  localparam int LAT = int'(adder_phases(N));

  logic clk = 0;
  logic rst_n, in_valid, out_valid;
  logic [N-1:0] a, b;
  logic [N:0]   sum;
  logic [N:0]   expq [$];
  int checks = 0, failures = 0, couts = 0, ripples = 0;

  qca_adder dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
                 .out_valid(out_valid), .sum(sum));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      logic [N:0] e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL result without a pending pair");
      end else begin
        e = expq.pop_front();
        if (sum !== e) begin failures++; $display("FAIL sum=%h expected %h", sum, e); end
        if (e[N]) couts++;
      end
    end
  end

  initial begin
    int ticks;
    rst_n = 0; in_valid = 0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    repeat (LAT + 2) @(posedge clk);
    #2;
    a = '1; b = 64'd1; in_valid = 1;
    expq.push_back({1'b0, a} + {1'b0, b});
    ripples++;
    @(posedge clk); #2;
    in_valid = 0;
    ticks = 1;
    while (!out_valid && ticks < 200) begin @(posedge clk); #2; ticks++; end
    checks++;
    if (ticks != 36) begin failures++; $display("FAIL latency %0d phases", ticks); end
    else $display("64-bit latency: %0d clock phases = %0d clock cycles", ticks, ticks / int'(PHASES_PER_CYCLE));
    for (int t = 0; t < 200; t++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (t % 10 == 0) begin a = '1; b = 64'd1 << (t % 3); end
      in_valid = 1;
      expq.push_back({1'b0, a} + {1'b0, b});
      repeat (int'(PHASES_PER_CYCLE)) begin @(posedge clk); #2; in_valid = 0; end
    end
    repeat (LAT + 2) @(posedge clk);
    #2;
    checks++;
    if (expq.size() != 0 || couts == 0) begin
      failures++; $display("FAIL %0d results missing, %0d carry-outs", expq.size(), couts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
