// acc_out_ctrl: accumulator and output control of a reconfigurable multiplier.
//
// Receives the products p[j] of the N/8 internal 8xN Booth multipliers, where
// p[j] belongs to the ib slice of byte j (j = 0 least significant).
//   MODE_DEFAULT   : prod = sum over j of signed(p[j]) * 2^(8j), the signed
//                    2N-bit product of the two N-bit operands; lp_prod = 0.
//   MODE_LOW_POWER : lp_prod[j] = p[j][15:0], the signed 8x8 product of
//                    byte lane j; prod = 0.
// The block's name, its place after the internal multipliers and its outputs
// (lane outputs and one full-width output) follow the design description;
// reading "accumulator" as the shifted sum of the slice products, with no
// register, and holding the unused outputs at 0 are this design's choices.
// The lane outputs are 16 bits wide because an exact 8x8 product is.
//
// Timing: purely combinational.
module acc_out_ctrl
  import r4rc_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N/LANE_W-1:0][N+7:0]    p,
  input  logic                          mode_select,
  output logic [2*N-1:0]                prod,
  output logic [N/LANE_W-1:0][LANE_P_W-1:0] lp_prod
);

  localparam int unsigned K = N / LANE_W;

  logic [2*N-1:0] acc;

  always_comb begin
    acc = '0;
    for (int j = 0; j < K; j++) begin
      acc = acc + ((2*N)'($signed(p[j])) << (LANE_W * j));
    end
    if (mode_select == MODE_DEFAULT) begin
      prod    = acc;
      lp_prod = '0;
    end else begin
      prod = '0;
      for (int j = 0; j < K; j++) lp_prod[j] = p[j][LANE_P_W-1:0];
    end
  end

endmodule
