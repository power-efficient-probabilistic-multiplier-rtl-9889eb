// tb_lsb_imperfect: exhaustive check of the whole imperfect part at N=8.
// For every pair of low halves (4 bits each) the expected 8-bit result and
// compensation bit are written out bit by bit from the gate-level map:
// P7 = A3|B3, comp = A3&B3, P6 = P0 = A2|B2, P5 = P1 = A1|B1,
// P4 = P2 = P3 = A0|B0.
module tb_lsb_imperfect;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] p;
  logic       comp;

  lsb_imperfect #(.N(8)) dut (.a_lo(a), .b_lo(b), .p_lo(p), .comp(comp));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [3:0] o;
      logic [7:0] exp_p;
      {a, b} = 8'(v);
      o = a | b;
      exp_p = {o[3], o[2], o[1], o[0], o[0], o[0], o[1], o[2]};
      #1;
      checks++;
      if (p !== exp_p || comp !== (a[3] & b[3])) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b exp=%b comp=%b", a, b, p, exp_p, comp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
