// booth_pp_decoder: partial-product decoder of a radix-4 Booth multiplier.
//
// From one Booth digit (booth_r4_encoder) and the signed N-bit multiplicand
// `ia` it forms one partial-product row of N+1 bits:
//   |d| = 1 -> ia sign-extended to N+1 bits
//   |d| = 2 -> ia shifted left by one
//   d   = 0 -> all zero
// and, for a negative digit, inverts every bit. The +1 that completes the
// two's-complement negation is returned on `neg` and is added by the
// compressor array at the row's least significant column, as is usual in
// Booth arrays. The row is therefore a one's-complement value:
//   $signed(pp) + neg == d * $signed(ia).
// The decoder and its two inputs (Booth digit, multiplicand) follow the
// description of the design; its gate structure is the textbook one.
//
// Timing: purely combinational.
module booth_pp_decoder
  import r4rc_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  booth_digit_t digit,
  input  logic [N-1:0] ia,
  output logic [N:0]   pp,
  output logic         neg
);

  logic [N:0] ia_x1;  // ia sign-extended
  logic [N:0] ia_x2;  // ia shifted left by one

  always_comb begin
    ia_x1 = {ia[N-1], ia};
    ia_x2 = {ia, 1'b0};
    pp    = ({(N+1){digit.one}} & ia_x1) | ({(N+1){digit.two}} & ia_x2);
    pp    = pp ^ {(N+1){digit.neg}};
    neg   = digit.neg;
  end

endmodule
