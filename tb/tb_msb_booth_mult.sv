// tb_msb_booth_mult: the perfect multiplier must return a*b + comp exactly.
// W=4 (the 8-bit design's MSB part) is checked for every operand pair and
// both compensation values; W=8 is checked on random operands.
module tb_msb_booth_mult;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic        c4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic        c8;

  msb_booth_mult #(.W(4)) dut4 (.a(a4), .b(b4), .comp(c4), .p(p4));
  msb_booth_mult #(.W(8)) dut8 (.a(a8), .b(b8), .comp(c8), .p(p8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {c4, a4, b4} = 9'(v);
      a8 = 8'($urandom);
      b8 = 8'($urandom);
      c8 = 1'($urandom);
      #1;
      checks++;
      if (int'(p4) != int'(a4) * int'(b4) + int'(c4)) begin
        failures++;
        $display("FAIL W=4: %0d*%0d+%0d = %0d", a4, b4, c4, p4);
      end
      checks++;
      if (int'(p8) != int'(a8) * int'(b8) + int'(c8)) begin
        failures++;
        $display("FAIL W=8: %0d*%0d+%0d = %0d", a8, b8, c8, p8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
