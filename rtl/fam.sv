// fam: fused add-multiply (FAM) unit, Z = X * (A + B), in two's complement.
//
// Instead of adding A and B with a carry-propagating adder and then Booth
// encoding the sum, the sum is recoded straight into radix-4 Modified Booth
// (MB) digits by a sum-to-MB (S-MB) recoder, whose carries reach at most one
// digit further. That removes the adder from the critical path. The rest is a
// radix-4 MB multiplier:
//   S-MB recoder (scheme SCHEME) -> ND digits of A+B
//   mb_encoder per digit          -> sign / one / two / carry
//   pp_generator                  -> ND partial product rows
//   correction_term (CT)          -> one row of +1s and sign constants
//   csa_tree                      -> S and C vectors
//   cla_adder                     -> Z = S + C
// With ND = N/2 + 1 digits the tree adds ND + 1 rows, about half the rows of
// a radix-2 array.
//
// Interface: x, a, b are N-bit two's complement; z is the W = 2N+1 bit two's
// complement product, exact for all inputs; y are the recoded digits of A+B
// (Booth triples, value -2*hi + mid + lo, weight 4^j), brought out for
// observation. Purely combinational: no clock, z settles one propagation delay
// after the inputs change.
//
// The block structure and the three recoding schemes follow the published
// FAM architecture; the product width, the CT contents and the tree shape are
// this design's choices.
module fam
  import fam_pkg::*;
#(
  parameter int          N      = 8,
  parameter smb_scheme_e SCHEME = SMB1,
  localparam int         ND     = num_digits(N),
  localparam int         W      = prod_width(N)
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [W-1:0] z,
  output mb_triple_t   y [ND]
);

  mb_code_t      code  [ND];
  logic [ND-1:0] carry;
  logic [W-1:0]  rows  [ND+1];
  logic [W-1:0]  s_vec, c_vec;
  logic          cla_cout;   // carry out of bit W-1: the product fits W bits, unused

  if (SCHEME == SMB1) begin : g_smb1
    smb1_recoder #(.N(N)) u_recoder (.a(a), .b(b), .y(y));
  end else if (SCHEME == SMB2) begin : g_smb2
    smb2_recoder #(.N(N)) u_recoder (.a(a), .b(b), .y(y));
  end else begin : g_smb3
    smb3_recoder #(.N(N)) u_recoder (.a(a), .b(b), .y(y));
  end

  for (genvar j = 0; j < ND; j++) begin : g_enc
    mb_encoder u_enc (.digit(y[j]), .code(code[j]));
    assign carry[j] = code[j].carry;
  end

  pp_generator #(.N(N)) u_ppg (
    .x   (x),
    .code(code),
    .row (rows[0:ND-1])
  );

  correction_term #(.N(N)) u_ct (
    .carry(carry),
    .ct   (rows[ND])
  );

  csa_tree #(.ROWS(ND + 1), .W(W)) u_csa (
    .rows (rows),
    .sum  (s_vec),
    .carry(c_vec)
  );

  cla_adder #(.W(W)) u_cla (
    .a   (s_vec),
    .b   (c_vec),
    .cin (1'b0),
    .sum (z),
    .cout(cla_cout)
  );

endmodule
