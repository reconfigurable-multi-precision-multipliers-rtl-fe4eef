// booth_r4_encoder: radix-4 (modified) Booth recoder for one digit.
//
// A 3-bit overlapping group {b[2i+1], b[2i], b[2i-1]} of the multiplier
// operand is recoded into a digit d = -2*b[2i+1] + b[2i] + b[2i-1], which lies
// in {-2,-1,0,+1,+2}. The digit is given as select lines (see r4rc_pkg):
//   one = b[2i] ^ b[2i-1]                       (|d| = 1)
//   two = b[2i+1] ? ~b[2i] & ~b[2i-1] : b[2i] & b[2i-1]   (|d| = 2)
//   neg = b[2i+1] & ~(b[2i] & b[2i-1])           (d < 0)
// Group 111 (d = 0) gives neg = 0, so a zero digit never inverts its row;
// this is a choice of this design.
//
// Interface: grp[2:0] = {b[2i+1], b[2i], b[2i-1]}; digit out.
// Timing: purely combinational.
module booth_r4_encoder
  import r4rc_pkg::*;
(
  input  logic [2:0]   grp,
  output booth_digit_t digit
);

  always_comb begin
    digit.one = grp[1] ^ grp[0];
    digit.two = grp[2] ? (~grp[1] & ~grp[0]) : (grp[1] & grp[0]);
    digit.neg = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule
