// smb2_recoder: S-MB2 sum-to-Modified-Booth recoder. It turns two N-bit two's
// complement numbers A and B directly into the radix-4 MB digits of A+B.
//
// How it works: recoding cell j handles bits 2j and 2j+1 with three cells.
// An HA adds a[2j+1] and b[2j+1]; its carry c[2j+2,1] goes to the next cell's
// FA, its sum goes down to an HA*. The FA adds a[2j], b[2j] and c[2j,1] from
// the cell below, giving s[2j] and c[2j+1]. The HA* adds the HA sum and
// c[2j+1] and gives the negatively weighted s[2j+1] and a carry c[2j+2,2].
// Digit j is
//   y_j = -2*s[2j+1] + s[2j] + c[2j,2]          (in {-2..+2})
// with c[0,1] = c[0,2] = 0. No carry travels further than one cell.
// Even N = 2k: the MSB cell's HA takes the negatively weighted a[2k-1],
// b[2k-1] (an HA* with negative carry c[2k,1] and positive sum) and the extra
// signed digit is y_k = c[2k,2] - c[2k,1].
// Odd N = 2k+1: an FA** adds -a[2k], -b[2k] and c[2k,1], giving the negative
// carry c[2k+1] and s[2k]; y_k = -2*c[2k+1] + s[2k] + c[2k,2].
//
// Interface: a, b are N-bit two's complement; y[j], j = 0..N/2, is digit j as a
// Booth triple (value -2*hi + mid + lo), weight 4^j. Sum of y[j]*4^j = A + B.
// Purely combinational.
//
// The cell arrangement follows the published S-MB2 scheme; the Booth-triple
// form of the top signed digit is this design's choice. N must be at least 2.
module smb2_recoder
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
  logic [K:0]   c1;    // c1[j] = c[2j,1], carry of the upper half adder
  logic [K:0]   c2;    // c2[j] = c[2j,2], carry of the lower half adder
  logic [1:0]   r_up  [K];
  logic [1:0]   r_fa  [K];
  logic [1:0]   r_low [K];

  assign c1[0] = 1'b0;
  assign c2[0] = 1'b0;

  for (genvar j = 0; j < K; j++) begin : g_cell
    if ((N % 2 == 0) && (j == K - 1)) begin : g_msb_even
      // both inputs negatively weighted: negative carry, positive sum
      assign r_up[j] = ha_star(a[2*j+1], b[2*j+1]);
    end else begin : g_std
      assign r_up[j] = ha(a[2*j+1], b[2*j+1]);
    end
    assign c1[j+1] = r_up[j][1];

    assign r_fa[j] = fa(a[2*j], b[2*j], c1[j]);
    assign s[2*j]  = r_fa[j][0];

    assign r_low[j]  = ha_star(r_up[j][0], r_fa[j][1]);
    assign c2[j+1]   = r_low[j][1];
    assign s[2*j+1]  = r_low[j][0];

    assign y[j] = '{hi: s[2*j+1], mid: s[2*j], lo: c2[j]};
  end

  if (N % 2 == 0) begin : g_even_top
    // signed digit c[2k,2] - c[2k,1] = -2*c1 + c1 + c2
    assign y[ND-1] = '{hi: c1[K], mid: c1[K], lo: c2[K]};
  end else begin : g_odd_top
    logic [1:0] r_top;
    assign r_top  = fa_2star(a[N-1], b[N-1], c1[K]);
    assign s[N-1] = r_top[0];
    assign y[ND-1] = '{hi: r_top[1], mid: s[N-1], lo: c2[K]};
  end

endmodule
