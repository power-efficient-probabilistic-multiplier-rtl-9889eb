// cla_adder: carry-lookahead adder, the final adder of the perfect multiplier.
//
// Bit generate g = a & b and propagate p = a ^ b are formed for every bit.
// Bits are taken in 4-bit lookahead groups. Inside a group each carry is a
// flat sum of products of the g/p signals and the group's carry in:
//   c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]..p[s]c[s]
// and the carry into the next group is formed the same way, so the carry
// chain advances one group per step. The group size is this design's choice;
// the document asks only for a carry-lookahead adder.
// Interface: sum = a + b + cin modulo 2^WIDTH, cout = carry out of the top bit.
// Timing: purely combinational.
module cla_adder #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned GROUP = 4  // bits per lookahead group
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c = '0;
    c[0] = cin;
    for (int s = 0; s < WIDTH; s += GROUP) begin
      // s is the first bit of the group; c[s] is its carry in
      for (int i = s; i < s + GROUP && i < WIDTH; i++) begin
        logic term, pchain;
        term   = g[i];
        pchain = p[i];
        for (int j = i - 1; j >= s; j--) begin
          term   = term | (pchain & g[j]);
          pchain = pchain & p[j];
        end
        c[i+1] = term | (pchain & c[s]);
      end
    end
    sum  = p ^ c[WIDTH-1:0];
    cout = c[WIDTH];
  end

endmodule
