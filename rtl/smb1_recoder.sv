// smb1_recoder: S-MB1 sum-to-Modified-Booth recoder. It turns two N-bit two's
// complement numbers A and B directly into the radix-4 MB digits of A+B,
// without first forming the sum with a carry-propagating adder.
//
// How it works: every recoding cell j handles bits 2j and 2j+1. Bit b[2j+1]
// is split as b*2^(2j+2) - b*2^(2j+1): its negative half enters the cell's FA*
// together with a[2j+1] and the FA carry c[2j+1]; its positive half enters the
// FA of cell j+1 as third input. FA gives s[2j] and c[2j+1], FA* gives the
// negatively weighted s[2j+1] and c[2j+2]. Digit j is
//   y_j = -2*s[2j+1] + s[2j] + c[2j]          (in {-2..+2})
// and c[2j+2] only feeds digit j+1, so no carry travels further than one cell.
// Even N = 2k: the MSB cell's FA* takes a[2k-1] as its negative input and
// b[2k-1] as positive; the extra signed digit is y_k = c[2k] - b[2k-1].
// Odd N = 2k+1: the MSB bits a[2k], b[2k] go to an FA** with b[2k-1], and
// y_k = -2*c[2k+1] + s[2k] + c[2k].
//
// Interface: a, b are N-bit two's complement; y[j], j = 0..N/2, is digit j as a
// Booth triple (value -2*hi + mid + lo), weight 4^j. Sum of y[j]*4^j = A + B.
// Purely combinational.
//
// The cell arrangement follows the published S-MB1 scheme; expressing every
// digit, including the top signed digit, as a Booth triple is this design's
// choice so one encoder serves them all. N must be at least 2.
module smb1_recoder
  import fam_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output mb_triple_t   y [num_digits(N)]
);

  localparam int K  = N / 2;        // number of full two-bit cells
  localparam int ND = num_digits(N);

  logic [N-1:0] s;     // recoded sum bits (s[2j+1] negatively weighted)
  logic [N:0]   c;     // cell carries, c[0] = 0
  logic [1:0]   r_fa   [K];
  logic [1:0]   r_fas  [K];

  assign c[0] = 1'b0;

  for (genvar j = 0; j < K; j++) begin : g_cell
    // third FA input: positive half of b[2j-1] from the cell below
    logic b_in;
    if (j == 0) begin : g_lsb
      assign b_in = 1'b0;
    end else begin : g_mid
      assign b_in = b[2*j-1];
    end

    assign r_fa[j]  = fa(a[2*j], b[2*j], b_in);
    assign c[2*j+1] = r_fa[j][1];
    assign s[2*j]   = r_fa[j][0];

    if ((N % 2 == 0) && (j == K - 1)) begin : g_msb_even
      // a[2k-1] is negatively weighted; b[2k-1] keeps its positive half here
      assign r_fas[j] = fa_star(b[2*j+1], c[2*j+1], a[2*j+1]);
    end else begin : g_std
      assign r_fas[j] = fa_star(a[2*j+1], c[2*j+1], b[2*j+1]);
    end
    assign c[2*j+2] = r_fas[j][1];
    assign s[2*j+1] = r_fas[j][0];

    assign y[j] = '{hi: s[2*j+1], mid: s[2*j], lo: c[2*j]};
  end

  if (N % 2 == 0) begin : g_even_top
    // signed digit c[2k] - b[2k-1] = -2*b + b + c
    assign y[ND-1] = '{hi: b[N-1], mid: b[N-1], lo: c[N]};
  end else begin : g_odd_top
    logic [1:0] r_top;
    assign r_top  = fa_2star(a[N-1], b[N-1], b[N-2]);
    assign c[N]   = r_top[1];  // negatively weighted
    assign s[N-1] = r_top[0];
    assign y[ND-1] = '{hi: c[N], mid: s[N-1], lo: c[N-1]};
  end

endmodule
