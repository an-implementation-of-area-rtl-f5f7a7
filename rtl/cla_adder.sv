// cla_adder: carry-lookahead adder, the final adder of S and C.
//
// How it works: the operands are cut into blocks of GROUP bits (4 by
// default). In each block every bit forms its propagate p = a ^ b and
// generate g = a & b, and the lookahead logic gives every bit's carry in
// two-level AND-OR form straight from the block's carry in:
//   c[i+1] = g[i] | p[i]&g[i-1] | ... | p[i]&...&p[0]&c[0]
// so no bit waits for the carry of the bit below it. The block's carry out
// c[GROUP] is the next block's carry in. The sum bit is p[i] ^ c[i].
//
// Interface: a, b, cin in; sum (W bits) and cout out. Purely combinational.
// The 4-bit lookahead block with per-bit p, g, s and carry logic follows the
// published CLA structure; chaining the blocks by their carry out is this
// design's choice for widths above one block.
module cla_adder #(
  parameter int W     = 17,
  parameter int GROUP = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int NG = (W + GROUP - 1) / GROUP;
  localparam int WP = NG * GROUP;

  logic [WP-1:0] ap, bp, sp;
  logic [NG:0]   gc;   // block carries, gc[0] = cin

  assign ap    = WP'(a);
  assign bp    = WP'(b);
  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_block
    logic [GROUP-1:0] p, g;
    logic [GROUP:0]   c;
    assign p = ap[k*GROUP +: GROUP] ^ bp[k*GROUP +: GROUP];
    assign g = ap[k*GROUP +: GROUP] & bp[k*GROUP +: GROUP];

    // carry lookahead logic: each carry as a sum of products
    always_comb begin
      logic term;
      c[0] = gc[k];
      for (int i = 0; i < GROUP; i++) begin
        term = gc[k];
        for (int m = 0; m <= i; m++) term = term & p[m];
        c[i+1] = term;
        for (int m = 0; m <= i; m++) begin
          term = g[m];
          for (int q = m + 1; q <= i; q++) term = term & p[q];
          c[i+1] = c[i+1] | term;
        end
      end
    end

    assign sp[k*GROUP +: GROUP] = p ^ c[GROUP-1:0];
    assign gc[k+1] = c[GROUP];
  end

  assign sum = sp[W-1:0];

  if (W == WP) begin : g_full
    assign cout = gc[NG];
  end else begin : g_part
    // padding bits are zero, so the sum bit at W is the carry into bit W
    assign cout = sp[W];
  end

endmodule
