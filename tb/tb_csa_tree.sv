// tb_csa_tree: random check of the carry-save tree with 5 rows of 8 bits
// (the size used by the 8-bit multiplier) and 9 rows of 16 bits. The two
// output rows must add up to the total of the inputs, modulo 2^WIDTH.
module tb_csa_tree;
  int checks = 0, failures = 0;

  logic [4:0][7:0]  r5;
  logic [7:0]       s5, c5;
  logic [8:0][15:0] r9;
  logic [15:0]      s9, c9;

  csa_tree #(.ROWS(5), .WIDTH(8))  dut5 (.rows(r5), .sum(s5), .carry(c5));
  csa_tree #(.ROWS(9), .WIDTH(16)) dut9 (.rows(r9), .sum(s9), .carry(c9));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [7:0]  e5;
      logic [15:0] e9;
      e5 = '0; e9 = '0;
      for (int i = 0; i < 5; i++) begin
        r5[i] = 8'($urandom);
        e5 += r5[i];
      end
      for (int i = 0; i < 9; i++) begin
        r9[i] = 16'($urandom);
        e9 += r9[i];
      end
      #1;
      checks++;
      if (8'(s5 + c5) !== e5) begin
        failures++;
        $display("FAIL 5x8: %h + %h != %h", s5, c5, e5);
      end
      checks++;
      if (16'(s9 + c9) !== e9) begin
        failures++;
        $display("FAIL 9x16: %h + %h != %h", s9, c9, e9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
