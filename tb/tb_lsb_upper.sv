// tb_lsb_upper: exhaustive check of the LSB upper AND-OR gate.
// Drives all four input pairs and compares the product bit with the OR and the
// compensation bit with the AND of the two inputs, computed here by truth table.
module tb_lsb_upper;
  logic a_top, b_top, p_top, comp;
  int checks = 0, failures = 0;

  lsb_upper dut (.a_top(a_top), .b_top(b_top), .p_top(p_top), .comp(comp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic exp_p, exp_c;
      {a_top, b_top} = 2'(v);
      exp_p = (v != 0);   // any input high
      exp_c = (v == 3);   // both inputs high
      #1;
      checks++;
      if (p_top !== exp_p || comp !== exp_c) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b comp=%b", a_top, b_top, p_top, comp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
