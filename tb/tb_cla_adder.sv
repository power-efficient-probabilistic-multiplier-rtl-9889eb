// tb_cla_adder: exhaustive check of the 8-bit carry-lookahead adder (all a,
// b and carry-in) and a random check at 13 bits, a width that ends in a
// partial lookahead group. Sum and carry out are compared with a+b+cin.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;

  cla_adder #(.WIDTH(8))  dut8  (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  cla_adder #(.WIDTH(13)) dut13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {ci8, a8, b8} = 17'(v);
      a13 = 13'($urandom);
      b13 = 13'($urandom);
      ci13 = 1'($urandom);
      #1;
      checks++;
      if ({co8, s8} !== 9'(a8 + b8 + ci8)) begin
        failures++;
        if (failures < 10) $display("FAIL 8b: %0d+%0d+%0d = %0d", a8, b8, ci8, {co8, s8});
      end
      checks++;
      if ({co13, s13} !== 14'(a13 + b13 + ci13)) begin
        failures++;
        if (failures < 10) $display("FAIL 13b: %0d+%0d+%0d = %0d", a13, b13, ci13, {co13, s13});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
