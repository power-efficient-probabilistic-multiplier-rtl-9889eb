// lsb_lower: LSB lower part of the imperfect multiplier.
//
// Instead of generating and summing partial products, every product bit below
// P[N-1] is produced by a single two-input OR gate of one bit of each operand's
// low half. Gate k (k = 0 .. N/2-2) ORs A[k] and B[k]. Its output is used
// twice, as drawn in the design's gate-level diagram:
//   P[N/2 + k]     = A[k] | B[k]          (k = 0 .. N/2-2)
//   P[N/2 - 2 - k] = A[k] | B[k]          (k = 0 .. N/2-2)
// so gate N/2-2 drives P[N-2] and P[0], gate N/2-3 drives P[N-3] and P[1],
// and so on. The diagram leaves the middle bit P[N/2-1] without a gate; in
// this design it is driven by gate 0 as well (a design choice).
//
// Interface: a_lo, b_lo are operand bits N/2-2 .. 0 (bit N/2-1 goes to
// lsb_upper instead); p_lo is product bits P[N-2:0]. N must be at least 4.
// Timing: purely combinational, one gate level.
module lsb_lower #(
  parameter int unsigned N = 8  // operand width of the whole multiplier
) (
  input  logic [N/2-2:0] a_lo,
  input  logic [N/2-2:0] b_lo,
  output logic [N-2:0]   p_lo
);

  localparam int unsigned H = N / 2;

  logic [H-2:0] or_q;  // outputs of the OR gates

  always_comb begin
    or_q = a_lo | b_lo;
    for (int k = 0; k <= H - 2; k++) begin
      p_lo[H + k]     = or_q[k];
      p_lo[H - 2 - k] = or_q[k];
    end
    p_lo[H-1] = or_q[0];
  end

endmodule
