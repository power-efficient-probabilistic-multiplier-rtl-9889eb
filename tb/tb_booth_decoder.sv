// tb_booth_decoder: checks the partial-product generator at W=4 for every
// multiplicand and each of the five digit values -2..+2: the signed partial
// product plus the returned 'neg' bit must equal digit * a.
module tb_booth_decoder;
  import pm_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]   a;
  booth_digit_t dig;
  logic [5:0]   pp;
  logic         neg;

  booth_decoder #(.W(4)) dut (.a(a), .dig(dig), .pp(pp), .neg(neg));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = 0; av < 16; av++) begin
      for (int d = -2; d <= 2; d++) begin
        int got;
        a = 4'(av);
        dig.neg = (d < 0);
        dig.one = (d == 1 || d == -1);
        dig.two = (d == 2 || d == -2);
        #1;
        got = int'($signed(pp)) + int'(neg);
        checks++;
        if (got != d * av) begin
          failures++;
          $display("FAIL a=%0d digit=%0d pp=%b neg=%b -> %0d", av, d, pp, neg, got);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
