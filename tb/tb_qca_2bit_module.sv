// tb_qca_2bit_module: exhaustive check of the 2-bit slice. For all 32 input
// combinations, c_{i+1} and c_{i+2} must match the carries of the 2-bit sum
// {a_hi,a_lo} + {b_hi,b_lo} + c_i, and p, g must be a_lo|b_lo and a_lo&b_lo.
// The zoned instance must show them one tick later, the combinational one
// at once.
module tb_qca_2bit_module;
  logic clk = 0;
  logic a_lo, b_lo, a_hi, b_hi, c_in;
  logic [3:0] oz, oc;   // {c_mid, c_out, p, g}
  int checks = 0, failures = 0;

  qca_2bit_module #(.ZONED(1'b1)) dut_z (
    .clk(clk), .a_lo(a_lo), .b_lo(b_lo), .a_hi(a_hi), .b_hi(b_hi), .c_in(c_in),
    .c_mid(oz[3]), .c_out(oz[2]), .p(oz[1]), .g(oz[0]));
  qca_2bit_module #(.ZONED(1'b0)) dut_c (
    .clk(clk), .a_lo(a_lo), .b_lo(b_lo), .a_hi(a_hi), .b_hi(b_hi), .c_in(c_in),
    .c_mid(oc[3]), .c_out(oc[2]), .p(oc[1]), .g(oc[0]));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [3:0] exp_o;
      int lo_sum, full;
      {a_hi, b_hi, a_lo, b_lo, c_in} = 5'(v);
      lo_sum = int'(a_lo) + int'(b_lo) + int'(c_in);
      full   = 2 * (int'(a_hi) + int'(b_hi)) + lo_sum;
      exp_o  = {1'(lo_sum >= 2), 1'(full >= 4), a_lo | b_lo, a_lo & b_lo};
      #1;
      checks++;
      if (oc !== exp_o) begin
        failures++; $display("FAIL comb v=%0d got %b exp %b", v, oc, exp_o);
      end
      @(posedge clk); #1;
      checks++;
      if (oz !== exp_o) begin
        failures++; $display("FAIL zoned v=%0d got %b exp %b", v, oz, exp_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
