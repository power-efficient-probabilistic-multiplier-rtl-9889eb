// csa_tree: carry-save adder tree reducing ROWS addends to two rows.
//
// Each level groups the rows in threes and replaces every group with a row
// of full adders (3:2 counters): the sum row keeps its columns, the carry row
// is shifted up by one column. Rows left over from the grouping pass straight
// to the next level. A level turns R rows into 2*(R/3) + R%3 rows, and
// levels are added until two rows remain, so the depth grows with
// log_{3/2}(ROWS) (three levels for five rows). All arithmetic is modulo 2^WIDTH: carries out of the top
// column are dropped, which is exact whenever the true total fits in WIDTH
// bits. sum + carry equals the total of all inputs.
// Timing: purely combinational.
module csa_tree #(
  parameter int unsigned ROWS  = 5,  // number of addend rows (>= 1)
  parameter int unsigned WIDTH = 8   // width of every row and of the result
) (
  input  logic [ROWS-1:0][WIDTH-1:0] rows,
  output logic [WIDTH-1:0]           sum,
  output logic [WIDTH-1:0]           carry
);

  // rows left after 'level' reduction steps
  function automatic int unsigned rows_at(input int unsigned level);
    int unsigned r;
    r = ROWS;
    for (int unsigned l = 0; l < level; l++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  // number of levels needed to reach two rows
  function automatic int unsigned depth();
    int unsigned d;
    d = 0;
    while (rows_at(d) > 2) d++;
    return d;
  endfunction

  localparam int unsigned DEPTH = depth();

  // lvl[l] holds the rows entering level l; only its first rows_at(l) rows
  // are used, the rest are zero.
  logic [ROWS-1:0][WIDTH-1:0] lvl [DEPTH+1];

  assign lvl[0] = rows;

  for (genvar l = 0; l < DEPTH; l++) begin : g_level
    localparam int unsigned R      = rows_at(l);
    localparam int unsigned GROUPS = R / 3;
    localparam int unsigned NEXT   = 2 * GROUPS + R % 3;

    for (genvar g = 0; g < GROUPS; g++) begin : g_fa
      logic [WIDTH-1:0] x, y, z;
      assign x = lvl[l][3*g];
      assign y = lvl[l][3*g+1];
      assign z = lvl[l][3*g+2];
      assign lvl[l+1][2*g]   = x ^ y ^ z;
      assign lvl[l+1][2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
    end

    for (genvar r = 3 * GROUPS; r < R; r++) begin : g_pass
      assign lvl[l+1][r - GROUPS] = lvl[l][r];
    end

    for (genvar r = NEXT; r < ROWS; r++) begin : g_zero
      assign lvl[l+1][r] = '0;
    end
  end

  assign sum = lvl[DEPTH][0];
  if (ROWS >= 2) begin : g_carry
    assign carry = lvl[DEPTH][1];
  end else begin : g_no_carry
    assign carry = '0;
  end

endmodule
