// fam_pkg: types, size functions and recoding-cell functions shared by the
// fused add-multiply (FAM) datapath, which computes Z = X * (A + B).
//
// A radix-4 Modified Booth (MB) digit is carried between blocks as a triple of
// bits (hi, mid, lo) with value -2*hi + mid + lo, the same weighting the
// classic Booth window (y[2j+1], y[2j], y[2j-1]) has. Every digit the sum-to-MB
// recoders produce, including the top signed digit, is put in this form so a
// single Table-1 style encoder serves all of them.
//
// The cell functions model the signed-bit adder cells of the recoders. Each
// returns {carry, sum}; which of its inputs and outputs carry negative weight
// is given in its comment and checked by the arithmetic identity stated there.
package fam_pkg;

  // Radix-4 digit as a Booth triple: value = -2*hi + mid + lo.
  typedef struct packed {
    logic hi;
    logic mid;
    logic lo;
  } mb_triple_t;

  // Table 1 encoding of one digit.
  typedef struct packed {
    logic sign;   // digit is negative (or -0)
    logic one;    // |digit| == 1
    logic two;    // |digit| == 2
    logic carry;  // +1 to add at the row's LSB to finish the two's complement
  } mb_code_t;

  // Recoding scheme of a FAM instance.
  typedef enum logic [1:0] {
    SMB1 = 2'd1,
    SMB2 = 2'd2,
    SMB3 = 2'd3
  } smb_scheme_e;

  // Number of MB digits of the (n+1)-bit sum of two n-bit numbers:
  // k MB digits plus one signed digit for n = 2k, k+1 MB digits for n = 2k+1.
  function automatic int num_digits(input int n);
    return n / 2 + 1;
  endfunction

  // Width of the product of an n-bit X and the (n+1)-bit sum A+B.
  function automatic int prod_width(input int n);
    return 2 * n + 1;
  endfunction

  // Rows left after one level of 3:2 compression of r rows.
  function automatic int csa_next(input int r);
    return (r <= 2) ? r : 2 * (r / 3) + (r % 3);
  endfunction

  // Number of 3:2 levels needed to bring r rows down to two.
  function automatic int csa_levels(input int r);
    int n;
    int l;
    n = r;
    l = 0;
    while (n > 2) begin
      n = csa_next(n);
      l++;
    end
    return l;
  endfunction

  // Rows present at level l of the tree that starts with r rows.
  function automatic int csa_rows_at(input int r, input int l);
    int n;
    n = r;
    for (int i = 0; i < l; i++) n = csa_next(n);
    return n;
  endfunction

  // Value of a digit triple.
  function automatic int triple_value(input mb_triple_t t);
    return -2 * int'(t.hi) + int'(t.mid) + int'(t.lo);
  endfunction

  // FA: x + y + z = 2*carry + sum, all positive.
  function automatic logic [1:0] fa(input logic x, input logic y, input logic z);
    return {(x & y) | (x & z) | (y & z), x ^ y ^ z};
  endfunction

  // HA: x + y = 2*carry + sum, all positive.
  function automatic logic [1:0] ha(input logic x, input logic y);
    return {x & y, x ^ y};
  endfunction

  // FA*: p + q - n = 2*carry - sum. Two positive inputs, one negative input,
  // positive carry, negatively weighted sum.
  function automatic logic [1:0] fa_star(input logic p, input logic q, input logic n);
    logic [1:0] r;
    r = fa(p, q, ~n);
    return {r[1], ~r[0]};
  endfunction

  // FA**: -n1 - n2 + p = -2*carry + sum. Two negative inputs, one positive
  // input, negatively weighted carry, positive sum.
  function automatic logic [1:0] fa_2star(input logic n1, input logic n2, input logic p);
    logic [1:0] r;
    r = fa(~n1, ~n2, p);
    return {~r[1], r[0]};
  endfunction

  // HA*: x + y = 2*carry - sum. Inputs of equal sign, outputs of opposite
  // sign: with positive inputs the carry is positive and the sum negative;
  // with negative inputs (the MSB cell) the same gates give a negative carry
  // and a positive sum.
  function automatic logic [1:0] ha_star(input logic x, input logic y);
    return {x | y, x ^ y};
  endfunction

  // HA**: -n + p = 2*carry - sum. One negative input, one positive input,
  // positive carry, negatively weighted sum.
  function automatic logic [1:0] ha_2star(input logic n, input logic p);
    return {~n & p, n ^ p};
  endfunction

endpackage
