// pp_generator: Modified Booth partial product generator.
//
// For each encoded digit j it forms the (N+1)-bit row
//   p[i] = one & (x[i] ^ sign) | two & (x[i-1] ^ sign),   i = 0..N,
// with x sign-extended by one bit and x[-1] = 0. A row selects 0, X or 2X and
// inverts it for a negative digit; the +1 that completes the two's complement
// is the digit's carry bit, added by the correction term row. The row's sign
// bit p[N] is inverted and the row is placed at bit 2j of a W-bit word, so no
// sign extension is needed: the constant -2^(N+2j) this leaves is also in the
// correction term. The row of a zero digit is all zeros (before the sign bit
// inversion), whatever its sign bit.
//
// Interface: x is the N-bit two's complement multiplicand; code[j] are the
// ND = N/2+1 encoded digits; row[j] is the shifted, W = 2N+1 bit row.
// Purely combinational. The selection equation is the usual MB one; the
// sign-extension scheme is this design's choice, as the exact correction
// term is not spelled out.
module pp_generator
  import fam_pkg::*;
#(
  parameter int N  = 8,
  parameter int ND = num_digits(N),
  parameter int W  = prod_width(N)
) (
  input  logic [N-1:0] x,
  input  mb_code_t     code [ND],
  output logic [W-1:0] row  [ND]
);

  logic [N:0] xe;   // x sign-extended to N+1 bits
  logic [N:0] x2;   // 2x, N+1 bits
  assign xe = {x[N-1], x};
  assign x2 = {x, 1'b0};

  for (genvar j = 0; j < ND; j++) begin : g_row
    logic [N:0] p;
    always_comb begin
      p = ({(N+1){code[j].one}} & (xe ^ {(N+1){code[j].sign}}))
        | ({(N+1){code[j].two}} & (x2 ^ {(N+1){code[j].sign}}));
      row[j] = W'({~p[N], p[N-1:0]}) << (2 * j);
    end
  end

endmodule
