// booth_decoder: partial-product generator for one radix-4 Booth digit.
//
// Selects 0, a or 2a (W+1 bits) according to the digit and inverts the
// selection when the digit is negative, giving a (W+2)-bit one's-complement
// partial product whose top bit is the sign. The "+1" that completes the
// two's complement of a negative product is returned separately as 'neg' so
// that the carry-save tree can add it in the row's least significant column:
//   value(digit * a) = signed'(pp) + neg
// The perfect multiplier instantiates one decoder per digit.
// Timing: purely combinational.
module booth_decoder
  import pm_pkg::*;
#(
  parameter int unsigned W = 4  // multiplicand width (N/2 of the full design)
) (
  input  logic [W-1:0]  a,
  input  booth_digit_t  dig,
  output logic [W+1:0]  pp,
  output logic          neg
);

  logic [W:0] sel;

  always_comb begin
    sel = ({(W+1){dig.one}} & {1'b0, a}) | ({(W+1){dig.two}} & {a, 1'b0});
    pp  = {dig.neg, sel ^ {(W+1){dig.neg}}};
    neg = dig.neg;
  end

endmodule
