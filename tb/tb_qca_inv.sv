// tb_qca_inv: checks the inverter for both input values.
module tb_qca_inv;
  logic a, y;
  int checks = 0, failures = 0;

  qca_inv dut (.a(a), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      a = 1'(v);
      #1;
      checks++;
      if (y !== (v == 0)) begin
        failures++;
        $display("FAIL inv(%b) = %b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
