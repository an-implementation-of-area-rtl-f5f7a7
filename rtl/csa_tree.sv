// csa_tree: carry-save adder tree. It reduces ROWS rows of W bits to two
// rows, a sum vector S and a carry vector C, with S + C = sum of the rows
// (mod 2^W), without propagating any carry along a row.
//
// How it works: each level groups its rows in threes and replaces every group
// by the bitwise sum (XOR of the three) and the bitwise carry (majority of the
// three, shifted up one bit): a row of full adders, a 3:2 compressor. Rows
// left over when the count is not a multiple of three pass to the next level
// unchanged. A level of r rows leaves 2*floor(r/3) + r mod 3 rows; the tree
// has as many levels as it takes to reach two, about log1.5(ROWS/2).
// Carries out of bit W-1 are dropped: the result is exact modulo 2^W.
//
// Interface: rows[ROWS] in, sum and carry out, both W bits, ready for the
// final carry-propagating adder. Purely combinational. The 3:2 (Wallace)
// grouping is this design's choice; only the carry-save function and the S
// and C outputs are given. ROWS must be at least 2.
module csa_tree
  import fam_pkg::*;
#(
  parameter int ROWS = 6,
  parameter int W    = 17
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  localparam int LEVELS = csa_levels(ROWS);

  // g_level[l].rin holds the R rows entering level l; level LEVELS is the
  // output stage and holds the final two rows.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_level
    localparam int R = csa_rows_at(ROWS, l);
    logic [W-1:0] rin [R];

    if (l == 0) begin : g_in
      assign rin = rows;
    end else begin : g_reduce
      // rows of the level above
      localparam int RP = csa_rows_at(ROWS, l - 1);
      localparam int GP = RP / 3;
      for (genvar g = 0; g < GP; g++) begin : g_csa
        logic [W-1:0] x, y, z;
        assign x = g_level[l-1].rin[3*g];
        assign y = g_level[l-1].rin[3*g+1];
        assign z = g_level[l-1].rin[3*g+2];
        assign rin[2*g]   = x ^ y ^ z;
        assign rin[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
      end
      for (genvar m = 0; m < RP % 3; m++) begin : g_pass
        assign rin[2*GP+m] = g_level[l-1].rin[3*GP+m];
      end
    end
  end

  assign sum   = g_level[LEVELS].rin[0];
  assign carry = g_level[LEVELS].rin[1];

endmodule
