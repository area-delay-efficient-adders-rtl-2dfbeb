// tb_qca_lsb_module: exhaustive check of the least significant slice.
// For every value of a[1:0], b[1:0] (carry-in 0) c1 and c2 must equal bits
// 1 and 2 of a+b computed with integer arithmetic. The zoned instance must
// deliver them exactly two ticks after the inputs; the combinational one at
// once.
module tb_qca_lsb_module;
  logic clk = 0;
  logic [1:0] a, b;
  logic c1z, c2z, c1c, c2c;
  int checks = 0, failures = 0;

  qca_lsb_module #(.ZONED(1'b1)) dut_z (
    .clk(clk), .a0(a[0]), .b0(b[0]), .a1(a[1]), .b1(b[1]), .c1(c1z), .c2(c2z));
  qca_lsb_module #(.ZONED(1'b0)) dut_c (
    .clk(clk), .a0(a[0]), .b0(b[0]), .a1(a[1]), .b1(b[1]), .c1(c1c), .c2(c2c));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] ref_c(logic [1:0] x, logic [1:0] y);
    logic [2:0] s;
    s = 3'(x) + 3'(y);
    return {s[2], 1'(((x[0] & y[0])))};  // {c2, c1}
  endfunction

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [1:0] exp_c;
      {a, b} = 4'(v);
      exp_c = ref_c(a, b);
      #1;
      checks++;
      if ({c2c, c1c} !== exp_c) begin
        failures++; $display("FAIL comb a=%b b=%b got %b%b", a, b, c2c, c1c);
      end
      @(posedge clk);
      #1;
      // One tick later the result must not be there yet unless it happens to
      // equal the old one, so check only after the second tick.
      @(posedge clk);
      #1;
      checks++;
      if ({c2z, c1z} !== exp_c) begin
        failures++; $display("FAIL zoned a=%b b=%b got %b%b", a, b, c2z, c1z);
      end
    end
    // Latency: change the inputs from a non-carry to a carry case and look
    // for the output edge at tick 2 exactly.
    a = 2'b00; b = 2'b00;
    repeat (3) @(posedge clk);
    #1;
    a = 2'b11; b = 2'b01;   // c1 = 1, c2 = 1
    @(posedge clk); #1;
    checks++;
    if (c2z !== 1'b0) begin failures++; $display("FAIL c2 arrived after one tick"); end
    @(posedge clk); #1;
    checks++;
    if (c2z !== 1'b1 || c1z !== 1'b1) begin failures++; $display("FAIL carries not there after two ticks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
