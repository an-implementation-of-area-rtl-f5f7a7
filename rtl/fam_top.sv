// fam_top: the three fused add-multiply units, one per sum-to-MB recoding
// scheme (S-MB1, S-MB2, S-MB3), side by side on shared operands. Each computes
// Z = X * (A + B) for N-bit two's complement X, A, B and gives the
// (2N+1)-bit product and the MB digits it recoded A+B into. The three are
// alternatives with the same function and different recoding cells, so the
// three products are equal for every input; their digits may differ.
// Purely combinational. N defaults to 8 bits, the size of the published
// simulations.
module fam_top
  import fam_pkg::*;
#(
  parameter int  N  = 8,
  localparam int ND = num_digits(N),
  localparam int W  = prod_width(N)
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [W-1:0] z_smb1,
  output logic [W-1:0] z_smb2,
  output logic [W-1:0] z_smb3,
  output mb_triple_t   y_smb1 [ND],
  output mb_triple_t   y_smb2 [ND],
  output mb_triple_t   y_smb3 [ND]
);

  fam #(.N(N), .SCHEME(SMB1)) u_fam_smb1 (.x(x), .a(a), .b(b), .z(z_smb1), .y(y_smb1));
  fam #(.N(N), .SCHEME(SMB2)) u_fam_smb2 (.x(x), .a(a), .b(b), .z(z_smb2), .y(y_smb2));
  fam #(.N(N), .SCHEME(SMB3)) u_fam_smb3 (.x(x), .a(a), .b(b), .z(z_smb3), .y(y_smb3));

endmodule
