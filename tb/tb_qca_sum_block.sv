// tb_qca_sum_block: feeds the 16-bit sum block carries and operand pairs
// derived by the testbench from random operands (carries by integer
// addition, (p,g) at even positions >= 2, (a,b) elsewhere) and checks that
// the n+1 output bits equal a+b, in a zoned instance exactly two ticks later
// and in a combinational instance at once.
module tb_qca_sum_block;
  localparam int N = 16;
  localparam int T = 300;

  logic clk = 0;
  logic [N:1]   c;
  logic [N-1:0] x, y;
  logic [N:0]   sz, sc;
  logic [N:0]   hs [T];
  int checks = 0, failures = 0;

  qca_sum_block #(.N(N), .ZONED(1'b1)) dut_z (.clk(clk), .c(c), .x(x), .y(y), .s(sz));
  qca_sum_block #(.N(N), .ZONED(1'b0)) dut_c (.clk(clk), .c(c), .x(x), .y(y), .s(sc));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < T; t++) begin
      logic [N-1:0] a, b;
      a = N'($urandom); b = N'($urandom);
      if (t % 5 == 0) begin a = '1; b = N'(1); end
      hs[t] = {1'b0, a} + {1'b0, b};
      for (int i = 1; i <= N; i++) begin
        logic [N:0] m, s;
        m = ((N+1)'(1) << i) - 1;
        s = ({1'b0, a} & m) + ({1'b0, b} & m);
        c[i] = s[i];
      end
      for (int i = 0; i < N; i++) begin
        if (i >= 2 && i % 2 == 0) begin x[i] = a[i] | b[i]; y[i] = a[i] & b[i]; end
        else begin x[i] = a[i]; y[i] = b[i]; end
      end
      #1;
      checks++;
      if (sc !== hs[t]) begin failures++; $display("FAIL comb t=%0d got %h exp %h", t, sc, hs[t]); end
      @(posedge clk); #1;
      if (t >= 1) begin
        checks++;
        if (sz !== hs[t-1]) begin failures++; $display("FAIL zoned t=%0d got %h exp %h", t, sz, hs[t-1]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
