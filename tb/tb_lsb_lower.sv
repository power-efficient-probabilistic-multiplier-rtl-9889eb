// tb_lsb_lower: checks the OR-gate LSB lower part at N=8 (exhaustive) and
// N=16 (random). The expected bit i is rebuilt from the bit map: bits at or
// above N/2 use operand bit i-N/2, bits below N/2-1 use operand bit N/2-2-i,
// and the middle bit P[N/2-1] uses operand bit 0.
module tb_lsb_lower;
  int checks = 0, failures = 0;

  logic [2:0]  a8, b8;
  logic [6:0]  p8;
  logic [6:0]  a16, b16;
  logic [14:0] p16;

  lsb_lower #(.N(8))  dut8  (.a_lo(a8),  .b_lo(b8),  .p_lo(p8));
  lsb_lower #(.N(16)) dut16 (.a_lo(a16), .b_lo(b16), .p_lo(p16));

  function automatic int src_bit(int n, int i);
    if (i >= n / 2) return i - n / 2;
    if (i == n / 2 - 1) return 0;
    return n / 2 - 2 - i;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0;
    for (int v = 0; v < 64; v++) begin
      {a8, b8} = 6'(v);
      #1;
      for (int i = 0; i < 7; i++) begin
        int k;
        k = src_bit(8, i);
        checks++;
        if (p8[i] !== (a8[k] | b8[k])) begin
          failures++;
          $display("FAIL N=8 a=%b b=%b bit %0d = %b", a8, b8, i, p8[i]);
        end
      end
    end
    for (int t = 0; t < 500; t++) begin
      a16 = 7'($urandom);
      b16 = 7'($urandom);
      #1;
      for (int i = 0; i < 15; i++) begin
        int k;
        k = src_bit(16, i);
        checks++;
        if (p16[i] !== (a16[k] | b16[k])) begin
          failures++;
          $display("FAIL N=16 a=%b b=%b bit %0d = %b", a16, b16, i, p16[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
