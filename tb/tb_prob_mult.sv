// tb_prob_mult: end-to-end test of the 8-bit probabilistic multiplier at its
// default size.
//
// 1. Every one of the 65536 operand pairs is applied and the 16-bit result is
//    compared with the reference model in pm_tb_pkg. The test also counts how
//    often each mechanism of the design is exercised: the compensation bit
//    (A[3] & B[3]) being set, and each radix-4 Booth digit value (-2..+2) in
//    the recoded high half of B. A mechanism that never occurs is a failure.
// 2. The exhaustive error statistics (mean error, mean |error|, max |error|)
//    are printed, and the run of 1000 random operand pairs used to quote an
//    average percentage error is repeated and printed.
// The design is combinational; each vector is given 1 time unit to settle.
module tb_prob_mult;
  import pm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0]  a, b;
  logic [15:0] p;

  prob_mult dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Booth digit value of window i of the zero-extended 4-bit high half of b
  function automatic int booth_digit(logic [3:0] bh, int i);
    logic [6:0] x;
    x = {2'b00, bh, 1'b0};
    return -2 * int'(x[2*i+2]) + int'(x[2*i+1]) + int'(x[2*i]);
  endfunction

  initial begin
    err_stats_t all, rnd;
    int n_comp;
    int n_digit[5];  // index digit+2
    stats_clear(all);
    stats_clear(rnd);
    n_comp = 0;
    foreach (n_digit[i]) n_digit[i] = 0;

    for (int v = 0; v < 65536; v++) begin
      longint unsigned expv;
      {a, b} = 16'(v);
      #1;
      expv = pm_ref(8, 64'(a), 64'(b));
      checks++;
      if (64'(p) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d expected %0d", a, b, p, expv);
      end
      stats_add(all, 64'(a) * 64'(b), 64'(p));
      if (a[3] & b[3]) n_comp++;
      if (a == 0) begin
        for (int i = 0; i < 3; i++) n_digit[booth_digit(b[7:4], i) + 2]++;
      end
    end

    for (int t = 0; t < 1000; t++) begin
      a = 8'($urandom);
      b = 8'($urandom);
      #1;
      checks++;
      if (64'(p) != pm_ref(8, 64'(a), 64'(b))) failures++;
      stats_add(rnd, 64'(a) * 64'(b), 64'(p));
    end

    stats_print("8-bit exhaustive", all);
    stats_print("8-bit 1000 random", rnd);
    $display("compensation active in %0d of 65536 products", n_comp);
    checks++;
    if (n_comp == 0) failures++;
    for (int d = -2; d <= 2; d++) begin
      $display("Booth digit %0d seen %0d times", d, n_digit[d + 2]);
      checks++;
      if (n_digit[d + 2] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
