// booth_encoder: radix-4 (modified) Booth recoder for the perfect multiplier.
//
// The unsigned W-bit multiplier b is extended with a zero below bit 0 and
// zeros above bit W-1, then cut into G = W/2+1 overlapping 3-bit windows
// (b[2i+1], b[2i], b[2i-1]). Each window becomes one digit in {-2..+2}:
//   000, 111 -> 0     001, 010 -> +1    011 -> +2
//   100 -> -2         101, 110 -> -1
// sum_i digit_i * 4^i equals b. Digits are booth_digit_t (neg/one/two).
// The radix and the digit table are the standard modified Booth encoding;
// the document names the encoder but does not print its table.
// Timing: purely combinational.
module booth_encoder
  import pm_pkg::*;
#(
  parameter int unsigned W = 4  // multiplier width (N/2 of the full design)
) (
  input  logic [W-1:0]                         b,
  output booth_digit_t [booth_groups(W)-1:0]   dig
);

  localparam int unsigned G = booth_groups(W);

  logic [2*G:0] bext;  // {zero extension, b, 0}

  always_comb begin
    bext = '0;
    bext[W:1] = b;
    for (int i = 0; i < G; i++) begin
      logic x2, x1, x0;
      x2 = bext[2*i+2];
      x1 = bext[2*i+1];
      x0 = bext[2*i];
      dig[i].one = x1 ^ x0;
      dig[i].two = (x2 & ~x1 & ~x0) | (~x2 & x1 & x0);
      dig[i].neg = x2 & ~(x1 & x0);
    end
  end

  // Every digit must be a legal code: magnitude 1 and 2 are exclusive and a
  // zero digit is never marked negative.
  always_comb begin
    for (int i = 0; i < G; i++) begin
      assert (!(dig[i].one && dig[i].two) && !(dig[i].neg && !dig[i].one && !dig[i].two))
        else $error("illegal Booth digit %0d: %b", i, dig[i]);
    end
  end

endmodule
