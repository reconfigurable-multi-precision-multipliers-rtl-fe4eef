// r4rc_mult: scalable reconfigurable multi-precision multiplier (R4RCn).
//
// N = 16 gives R4RC16, N = 32 gives R4RC32. The multiplier is a signed NxN
// radix-4 Booth multiplier split by multiplier-operand bytes into K = N/8
// internal 8xN Booth multipliers (booth_mult_8xn). Internal multiplier j
// takes all of inA and the 9-bit slice inB[8j+7 : 8j-1]; the lowest slice
// is {inB[7:0], 1'b0}. The accumulator and output control (acc_out_ctrl)
// adds the slice products shifted by 8j bits.
//
// mode_select = 1 (default mode): prod = signed(in_a) * signed(in_b), 2N bits.
// mode_select = 0 (low-power mode): K independent signed 8x8 products,
//   lp_prod[j] = signed(in_a[8j+7:8j]) * signed(in_b[8j+7:8j]),
// computed with the compressor columns above bit 15 of each internal
// multiplier switched off. One evaluation thus yields 2 (R4RC16) or 4
// (R4RC32) 8-bit products.
//
// Slice wiring, byte-lane pairing and the operand widths follow the design
// description. Lane j is numbered from the least significant byte, so the
// first lane output of the description (from the top multiplier) is
// lp_prod[K-1]. Timing: purely combinational, no clock.
module r4rc_mult
  import r4rc_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]                  in_a,
  input  logic [N-1:0]                  in_b,
  input  logic                          mode_select,
  output logic [2*N-1:0]                prod,
  output logic [N/LANE_W-1:0][LANE_P_W-1:0] lp_prod
);

  localparam int unsigned K = N / LANE_W;

  // inB with a 0 appended below bit 0, so slice j is b_ext[8j+8 : 8j].
  logic [N:0]             b_ext;
  logic [K-1:0][N+7:0]    p;

  assign b_ext = {in_b, 1'b0};

  for (genvar j = 0; j < K; j++) begin : g_slice
    booth_mult_8xn #(
      .N        (N),
      .A_LP_LSB (LANE_W * j)
    ) u_mult (
      .ia          (in_a),
      .ib          (b_ext[LANE_W*j +: LANE_W+1]),
      .mode_select (mode_select),
      .p           (p[j])
    );
  end

  acc_out_ctrl #(.N(N)) u_acc (
    .p           (p),
    .mode_select (mode_select),
    .prod        (prod),
    .lp_prod     (lp_prod)
  );

  initial begin
    assert (N % LANE_W == 0 && N >= 2 * LANE_W)
      else $error("r4rc_mult: N must be a multiple of 8 and at least 16");
  end

endmodule
