// tb_prob_mult_sweep: the probabilistic multiplier over a range of operand
// widths, N = 4, 6, 10, 12, 14, 16 and 32 (8 is covered by tb_prob_mult).
// The number of approximated product columns equals N, so this spans 4 to 32
// columns. Each width is checked against the reference model and its error
// statistics are printed.
module tb_prob_mult_sweep;
  localparam int NP = 7;
  logic [NP-1:0] done;
  int chk[NP], fl[NP];
  int checks = 0, failures = 0;

  pm_sweep_point #(.N(4))  p4  (.done(done[0]), .checks(chk[0]), .failures(fl[0]));
  pm_sweep_point #(.N(6))  p6  (.done(done[1]), .checks(chk[1]), .failures(fl[1]));
  pm_sweep_point #(.N(10)) p10 (.done(done[2]), .checks(chk[2]), .failures(fl[2]));
  pm_sweep_point #(.N(12)) p12 (.done(done[3]), .checks(chk[3]), .failures(fl[3]));
  pm_sweep_point #(.N(14)) p14 (.done(done[4]), .checks(chk[4]), .failures(fl[4]));
  pm_sweep_point #(.N(16)) p16 (.done(done[5]), .checks(chk[5]), .failures(fl[5]));
  pm_sweep_point #(.N(32)) p32 (.done(done[6]), .checks(chk[6]), .failures(fl[6]));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (&done);
    for (int i = 0; i < NP; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
