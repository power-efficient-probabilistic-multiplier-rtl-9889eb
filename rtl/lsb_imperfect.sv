// lsb_imperfect: the imperfect (LSB) multiplier part.
//
// Produces the low N product bits P[N-1:0] of the probabilistic multiplier
// from the low halves of the operands without any partial-product array, and
// the compensation bit for the perfect MSB multiplier. It groups the LSB upper
// part (one AND-OR gate on bit N/2-1) and the LSB lower part (N/2-1 OR gates
// on bits N/2-2 .. 0); see lsb_upper and lsb_lower for the bit mapping.
//
// Interface: a_lo, b_lo = A[N/2-1:0], B[N/2-1:0]; p_lo = P[N-1:0];
// comp = compensation bit. Timing: combinational, one gate level.
module lsb_imperfect #(
  parameter int unsigned N = 8  // operand width of the whole multiplier
) (
  input  logic [N/2-1:0] a_lo,
  input  logic [N/2-1:0] b_lo,
  output logic [N-1:0]   p_lo,
  output logic           comp
);

  lsb_upper u_upper (
    .a_top (a_lo[N/2-1]),
    .b_top (b_lo[N/2-1]),
    .p_top (p_lo[N-1]),
    .comp  (comp)
  );

  lsb_lower #(.N(N)) u_lower (
    .a_lo (a_lo[N/2-2:0]),
    .b_lo (b_lo[N/2-2:0]),
    .p_lo (p_lo[N-2:0])
  );

endmodule
