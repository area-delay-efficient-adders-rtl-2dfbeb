// tb_qca_maj: exhaustive check of the majority gate against a count of ones.
module tb_qca_maj;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_maj dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== ((32'(a) + 32'(b) + 32'(c)) >= 2)) begin
        failures++;
        $display("FAIL M(%b,%b,%b) = %b", a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
