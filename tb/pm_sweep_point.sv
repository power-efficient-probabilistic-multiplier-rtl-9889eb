// pm_sweep_point: one operand width of the multiplier size sweep.
//
// Instantiates the probabilistic multiplier at width N, applies SAMPLES
// operand pairs (every pair when N <= 6, random pairs otherwise), compares
// each result with the reference model and accumulates the error against the
// exact product. When finished it prints the error statistics for this width
// and raises 'done'; 'checks' and 'failures' then hold its tallies.
module pm_sweep_point #(
  parameter int unsigned N       = 16,   // operand width under test
  parameter int unsigned SAMPLES = 2000  // random pairs for N > 6
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import pm_tb_pkg::*;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  prob_mult #(.N(N)) dut (.a(a), .b(b), .p(p));

  task automatic apply(input longint unsigned av, input longint unsigned bv,
                       ref err_stats_t s);
    longint unsigned got;
    a = N'(av);
    b = N'(bv);
    #1;
    got = 64'(p);
    checks++;
    if (got != pm_ref(N, av, bv)) begin
      failures++;
      if (failures < 5) $display("FAIL N=%0d a=%0d b=%0d p=%0d expected %0d",
                                 N, av, bv, got, pm_ref(N, av, bv));
    end
    stats_add(s, av * bv, got);
  endtask

  initial begin
    err_stats_t s;
    string tag;
    done = 0;
    checks = 0;
    failures = 0;
    stats_clear(s);
    if (N <= 6) begin
      for (longint unsigned av = 0; av < (64'd1 << N); av++)
        for (longint unsigned bv = 0; bv < (64'd1 << N); bv++)
          apply(av, bv, s);
    end else begin
      for (int t = 0; t < SAMPLES; t++) begin
        longint unsigned mask;
        mask = (N >= 64) ? '1 : ((64'd1 << N) - 1);
        apply({$urandom, $urandom} & mask, {$urandom, $urandom} & mask, s);
      end
    end
    tag = $sformatf("N=%0d (%0d approximated product columns)", N, N);
    stats_print(tag, s);
    done = 1;
  end
endmodule
