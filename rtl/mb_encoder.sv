// mb_encoder: Modified Booth encoder of one radix-4 digit (Table 1 encoding).
//
// The digit arrives as a Booth triple (hi, mid, lo) = (y[2j+1], y[2j], y[2j-1])
// with value -2*hi + mid + lo. The encoder gives
//   sign  = hi                       the digit is negative (or -0)
//   one   = mid ^ lo                 |digit| = 1
//   two   = hi ? ~mid & ~lo : mid & lo   |digit| = 2
//   carry = hi & ~(mid & lo)         +1 the partial product row needs
// carry is 0 for the triple 111 (digit -0), where the row selects nothing.
// The encoding table is the published one; the gate equations are derived
// from it. Purely combinational.
module mb_encoder
  import fam_pkg::*;
(
  input  mb_triple_t digit,
  output mb_code_t   code
);

  always_comb begin
    code.sign  = digit.hi;
    code.one   = digit.mid ^ digit.lo;
    code.two   = digit.hi ? (~digit.mid & ~digit.lo) : (digit.mid & digit.lo);
    code.carry = digit.hi & ~(digit.mid & digit.lo);
  end

endmodule
