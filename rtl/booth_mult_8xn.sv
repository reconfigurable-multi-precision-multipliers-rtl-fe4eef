// booth_mult_8xn: reconfigurable radix-4 Booth multiplier, 8 x N bits.
//
// This is the internal multiplier of which R4RC16 uses two (N = 16) and
// R4RC32 four (N = 32). It multiplies the signed N-bit multiplicand `ia` by
// the Booth value of a 9-bit slice `ib` of the multiplier operand,
//   B = -128*ib[8] + 64*ib[7] + ... + 1*ib[1] + ib[0],
// i.e. the signed byte ib[8:1] plus the overlap bit ib[0] taken from the
// next lower byte. Slices of one operand therefore sum to its exact value.
//
// Structure (all combinational):
//   * four booth_r4_encoder digits from ib,
//   * four booth_pp_decoder rows of N+1 bits, row i weighted by 4^i,
//   * one row of W = N+8 rc_compressor42 cells that reduces the four rows to
//     a sum and a carry vector; the +1 corrections of rows 0..2 sit in the
//     empty low columns of rows 1..3,
//   * a final carry-propagate adder that adds sum, carry and the +1 of row 3.
// Rows are sign-extended across all W columns. The carry and cout of the top
// column are left unused on purpose: they weigh 2^W, and |p| <= 2^(N+6), so
// the product never needs them (lint reports them as unused bits).
//
// Modes (mode_select, see r4rc_pkg):
//   MODE_DEFAULT   : p = ia * B, a signed N+8 bit product.
//   MODE_LOW_POWER : the multiplicand is the byte lane ia[A_LP_LSB +: 8],
//                    the overlap bit ib[0] is forced to 0, and the
//                    compressors of columns 16 and above are switched off.
//                    p[15:0] = signed(ia lane) * signed(ib[8:1]), exact,
//                    and p[W-1:16] = 0.
// What follows the design description: radix-4 Booth encoding, the 9-bit
// ib slice, the N+8 bit product, the operand selection per mode and the use
// of reconfigurable 4-2 compressors. This design's own choices: the forced
// overlap bit, the column gating boundary, the full sign extension of rows
// and the final adder.
module booth_mult_8xn
  import r4rc_pkg::*;
#(
  parameter int unsigned N        = 16,  // multiplicand width (16 or 32)
  parameter int unsigned A_LP_LSB = 0    // low-power byte lane of ia
) (
  input  logic [N-1:0] ia,
  input  logic [8:0]   ib,
  input  logic         mode_select,
  output logic [N+7:0] p
);

  localparam int unsigned W    = N + 8;      // product / column count
  localparam int unsigned ROWS = DIGITS_PER_SLICE;

  // ---- operand selection per mode -----------------------------------------
  logic [N-1:0] ia_op;
  logic [8:0]   ib_op;
  logic         full;

  always_comb begin
    full  = (mode_select == MODE_DEFAULT);
    ia_op = full ? ia : {{(N-LANE_W){ia[A_LP_LSB+LANE_W-1]}}, ia[A_LP_LSB +: LANE_W]};
    ib_op = full ? ib : {ib[8:1], 1'b0};
  end

  // ---- Booth encoding and partial-product rows ----------------------------
  booth_digit_t     digit [ROWS];
  logic [N:0]       pp    [ROWS];
  logic [ROWS-1:0]  neg;

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    booth_r4_encoder u_enc (
      .grp   (ib_op[2*i +: 3]),
      .digit (digit[i])
    );
    booth_pp_decoder #(.N(N)) u_dec (
      .digit (digit[i]),
      .ia    (ia_op),
      .pp    (pp[i]),
      .neg   (neg[i])
    );
  end

  // Place the rows on the W columns: row i starts at column 2i and is
  // sign-extended to the top; the +1 of row i-1 fills column 2(i-1) of row i.
  logic [W-1:0] row [ROWS];

  always_comb begin
    for (int i = 0; i < ROWS; i++) begin
      row[i] = W'({{(W-N-1){pp[i][N]}}, pp[i]}) << (2 * i);
      if (i > 0) row[i][2*(i-1)] = neg[i-1];
    end
  end

  // ---- reconfigurable 4-2 compressor row ----------------------------------
  logic [W-1:0] col_en;
  logic [W-1:0] s_vec, c_vec, co_vec;

  for (genvar k = 0; k < W; k++) begin : g_col
    assign col_en[k] = full || (k < LANE_P_W);
    rc_compressor42 u_c42 (
      .x     ({row[3][k], row[2][k], row[1][k], row[0][k]}),
      .cin   ((k == 0) ? 1'b0 : co_vec[(k == 0) ? 0 : k-1]),
      .en    (col_en[k]),
      .sum   (s_vec[k]),
      .carry (c_vec[k]),
      .cout  (co_vec[k])
    );
  end

  // ---- final carry-propagate adder ----------------------------------------
  logic [W-1:0] total;

  always_comb begin
    total = s_vec + {c_vec[W-2:0], 1'b0} + (W'(neg[ROWS-1]) << (2 * (ROWS - 1)));
    p     = full ? total : {{(W-LANE_P_W){1'b0}}, total[LANE_P_W-1:0]};
  end

endmodule
