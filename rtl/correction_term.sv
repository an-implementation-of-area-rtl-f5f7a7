// correction_term: the correction term (CT) row of the MB multiplier.
//
// The partial product generator leaves two things out of its rows: the +1 of
// every negative row (the digit's carry bit, weight 4^j) and the constant
// -2^(N+2j) from inverting each row's sign bit. This block puts both in one
// W-bit row:
//   ct = KCONST + sum_j carry[j] * 4^j,   KCONST = -(sum_j 2^(N+2j)) mod 2^W.
// KCONST's lowest set bit is bit N and the carry bits sit at bits 0..2(ND-1),
// so the addition is a short carry chain from bit N up only when an even N
// makes the top digit's carry land on bit N; elsewhere it is plain wiring.
// Interface: carry[j] from the encoders, ct the row for the CSA tree.
// Purely combinational. The CT is named in the architecture; its contents are
// this design's choice, matching pp_generator.
module correction_term
  import fam_pkg::*;
#(
  parameter int N  = 8,
  parameter int ND = num_digits(N),
  parameter int W  = prod_width(N)
) (
  input  logic [ND-1:0] carry,
  output logic [W-1:0]  ct
);

  function automatic logic [W-1:0] kconst();
    logic [W-1:0] k;
    k = '0;
    for (int j = 0; j < ND; j++) k = k - (W'(1) << (N + 2 * j));
    return k;
  endfunction

  localparam logic [W-1:0] KCONST = kconst();

  logic [W-1:0] negs;   // carry bits at their weights 4^j

  always_comb begin
    negs = '0;
    for (int j = 0; j < ND; j++) negs[2*j] = carry[j];
    ct = KCONST + negs;
  end

endmodule
