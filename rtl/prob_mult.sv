// prob_mult: N x N-bit unsigned probabilistic multiplier.
//
// The product is split at column N. The high N product bits come from a
// perfect (exact) multiplier of the high operand halves, and the low N bits
// come from an imperfect part of single gates, with no partial products:
//   P[2N-1:N] = A[N-1:N/2] * B[N-1:N/2] + comp      (msb_booth_mult)
//   P[N-1]    = A[N/2-1] | B[N/2-1]                  (lsb_upper)
//   comp      = A[N/2-1] & B[N/2-1]                  (lsb_upper)
//   P[N-2:0]  = ORs of A[k], B[k], k < N/2-1         (lsb_lower)
// The cross products A_hi*B_lo and A_lo*B_hi are not computed; the result is
// an approximation that trades accuracy for far fewer gates. The split at
// N/2 (equal MSB and LSB halves) and the 8-bit default follow the document.
// Interface: a, b unsigned N-bit operands; p the 2N-bit approximate product.
// Timing: purely combinational; the critical path is the MSB multiplier.
module prob_mult #(
  parameter int unsigned N = 8  // operand width, a multiple of 2, at least 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned H = N / 2;

  logic comp;

  lsb_imperfect #(.N(N)) u_lsb (
    .a_lo (a[H-1:0]),
    .b_lo (b[H-1:0]),
    .p_lo (p[N-1:0]),
    .comp (comp)
  );

  msb_booth_mult #(.W(H)) u_msb (
    .a    (a[N-1:H]),
    .b    (b[N-1:H]),
    .comp (comp),
    .p    (p[2*N-1:N])
  );

endmodule
