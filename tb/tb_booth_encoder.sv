// tb_booth_encoder: exhaustive check of the radix-4 Booth recoder at W=4 and
// W=8. Every digit must be a legal code (one and two never both set, no
// negative zero) and sum(digit_i * 4^i) must equal the unsigned input.
module tb_booth_encoder;
  import pm_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0] b4;
  logic [7:0] b8;
  booth_digit_t [2:0] d4;
  booth_digit_t [4:0] d8;

  booth_encoder #(.W(4)) dut4 (.b(b4), .dig(d4));
  booth_encoder #(.W(8)) dut8 (.b(b8), .dig(d8));

  function automatic int digit_val(booth_digit_t d);
    int m;
    m = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -m : m;
  endfunction

  function automatic bit legal(booth_digit_t d);
    return !(d.one && d.two) && !(d.neg && !d.one && !d.two);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int s4, s8;
      bit ok;
      b4 = 4'(v);
      b8 = 8'(v);
      #1;
      s4 = 0; s8 = 0; ok = 1;
      for (int i = 0; i < 3; i++) begin
        s4 += digit_val(d4[i]) * (1 << (2 * i));
        ok &= legal(d4[i]);
      end
      for (int i = 0; i < 5; i++) begin
        s8 += digit_val(d8[i]) * (1 << (2 * i));
        ok &= legal(d8[i]);
      end
      checks++;
      if (v < 16 && s4 != v) begin
        failures++;
        $display("FAIL W=4 b=%0d recoded to %0d", v, s4);
      end
      checks++;
      if (s8 != v || !ok) begin
        failures++;
        $display("FAIL W=8 b=%0d recoded to %0d legal=%0b", v, s8, ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
