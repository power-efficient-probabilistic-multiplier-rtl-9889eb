// msb_booth_mult: the perfect multiplier of the MSB part.
//
// Multiplies the high halves of the operands exactly and adds the
// compensation bit from the imperfect part:  p = a * b + comp  (unsigned).
// The structure follows the block diagram of the MSB part:
//   booth_encoder  recodes b into G = W/2+1 radix-4 digits,
//   booth_decoder  turns each digit and a into a partial product,
//   csa_tree       reduces all rows to two,
//   cla_adder      adds the last two rows.
// Partial product i is placed at column 2i and sign-extended to 2W bits. The
// two's-complement "+1" bits of negative digits form one extra row, and the
// compensation bit is one more row with a single bit in column 0 (where it
// carries weight 2^N in the full product). The sum fits in 2W bits because
// (2^W-1)^2 + 1 < 2^(2W). How the compensation bit enters the perfect
// multiplier is this design's choice; the document only routes it there.
// Timing: purely combinational.
module msb_booth_mult
  import pm_pkg::*;
#(
  parameter int unsigned W = 4  // operand width (N/2 of the full design)
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           comp,
  output logic [2*W-1:0] p
);

  localparam int unsigned G    = booth_groups(W);
  localparam int unsigned PW   = 2 * W;    // product width
  localparam int unsigned ROWS = G + 2;    // partial products, +1 row, comp row

  booth_digit_t [G-1:0]      dig;
  logic [G-1:0][W+1:0]       pp;
  logic [G-1:0]              pp_neg;
  logic [ROWS-1:0][PW-1:0]   rows;
  logic [PW-1:0]             red_sum, red_carry;
  logic                      unused_cout;

  booth_encoder #(.W(W)) u_enc (
    .b   (b),
    .dig (dig)
  );

  for (genvar i = 0; i < G; i++) begin : g_dec
    booth_decoder #(.W(W)) u_dec (
      .a   (a),
      .dig (dig[i]),
      .pp  (pp[i]),
      .neg (pp_neg[i])
    );
  end

  always_comb begin
    rows = '0;
    for (int i = 0; i < G; i++) begin
      logic [PW-1:0] ext;
      ext = PW'({{PW{pp[i][W+1]}}, pp[i]});  // sign extension
      rows[i] = ext << (2 * i);
      rows[G][2*i] = pp_neg[i];
    end
    rows[G+1][0] = comp;
  end

  csa_tree #(.ROWS(ROWS), .WIDTH(PW)) u_tree (
    .rows  (rows),
    .sum   (red_sum),
    .carry (red_carry)
  );

  cla_adder #(.WIDTH(PW)) u_cla (
    .a    (red_sum),
    .b    (red_carry),
    .cin  (1'b0),
    .sum  (p),
    .cout (unused_cout)
  );

endmodule
