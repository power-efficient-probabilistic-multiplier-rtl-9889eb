// lsb_upper: LSB upper part of the imperfect multiplier (the AND-OR gate).
//
// Works on the top bit of each operand's low half, A[N/2-1] and B[N/2-1]:
//   p_top = A[N/2-1] | B[N/2-1]   -> product bit P[N-1]
//   comp  = A[N/2-1] & B[N/2-1]   -> compensation input of the perfect
//                                    multiplier (the C_comp signal)
// When both bits are one the discarded low-part products are largest, and the
// compensation bit returns one unit of weight 2^N to the MSB product.
// The gate, its inputs and its two outputs follow the document's gate-level
// diagram; where the compensation bit is added is decided in msb_booth_mult.
// Timing: purely combinational, one gate level.
module lsb_upper (
  input  logic a_top,  // A[N/2-1]
  input  logic b_top,  // B[N/2-1]
  output logic p_top,  // P[N-1]
  output logic comp    // compensation bit to the MSB part
);

  always_comb begin
    p_top = a_top | b_top;
    comp  = a_top & b_top;
  end

endmodule
