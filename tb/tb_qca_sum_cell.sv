// tb_qca_sum_cell: for every operand pair and carry-in, the carry-out is
// worked out by the testbench and both (a,b) and (p,g) forms of the operand
// pair are applied; the sum bit must equal the parity of a, b and c_i. The
// zoned cell must show it two ticks later and not after one.
module tb_qca_sum_cell;
  logic clk = 0;
  logic x, y, c_lo, c_hi, sz, sc;
  int checks = 0, failures = 0;

  qca_sum_cell #(.ZONED(1'b1)) dut_z (.clk(clk), .x(x), .y(y), .c_lo(c_lo), .c_hi(c_hi), .s(sz));
  qca_sum_cell #(.ZONED(1'b0)) dut_c (.clk(clk), .x(x), .y(y), .c_lo(c_lo), .c_hi(c_hi), .s(sc));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int form = 0; form < 2; form++) begin
      for (int v = 0; v < 8; v++) begin
        logic a, b, ci, exp_s;
        {a, b, ci} = 3'(v);
        c_lo = ci;
        c_hi = 1'((int'(a) + int'(b) + int'(ci)) >= 2);
        exp_s = 1'((int'(a) + int'(b) + int'(ci)) % 2);
        if (form == 0) begin x = a; y = b; end
        else begin x = a | b; y = a & b; end
        #1;
        checks++;
        if (sc !== exp_s) begin failures++; $display("FAIL comb form=%0d v=%0d", form, v); end
        @(posedge clk); #1;
        @(posedge clk); #1;
        checks++;
        if (sz !== exp_s) begin failures++; $display("FAIL zoned form=%0d v=%0d", form, v); end
      end
    end
    // Latency: s goes 0 -> 1 exactly on the second tick.
    x = 0; y = 0; c_lo = 0; c_hi = 0;
    repeat (3) @(posedge clk);
    #1;
    x = 1; y = 0; c_lo = 0; c_hi = 0;
    @(posedge clk); #1;
    checks++;
    if (sz !== 1'b0) begin failures++; $display("FAIL sum after one tick"); end
    @(posedge clk); #1;
    checks++;
    if (sz !== 1'b1) begin failures++; $display("FAIL sum missing after two ticks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
