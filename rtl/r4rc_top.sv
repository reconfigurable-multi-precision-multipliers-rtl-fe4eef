// r4rc_top: the two reconfigurable multi-precision multipliers side by side.
//
// R4RC16 (r4rc_mult, N = 16) and R4RC32 (r4rc_mult, N = 32) each have their
// own operands, mode select and outputs; they share nothing. A CNN
// accelerator would drive mode_select per layer: low-power mode (0) for the
// layers that tolerate 8-bit arithmetic, where one evaluation returns 2 or 4
// independent 8x8 products, and default mode (1) for the layers that need
// 16- or 32-bit precision. The choice of mode is left to the surrounding
// system.
//
// Outputs (see r4rc_mult): prodNN is the signed full-width product in default
// mode, lpNN[j] the signed 16-bit product of byte lane j in low-power mode.
// Timing: purely combinational, no clock.
module r4rc_top
  import r4rc_pkg::*;
#(
  parameter int unsigned N16 = 16,
  parameter int unsigned N32 = 32
) (
  // R4RC16
  input  logic [N16-1:0]                    a16,
  input  logic [N16-1:0]                    b16,
  input  logic                              mode16,
  output logic [2*N16-1:0]                  prod16,
  output logic [N16/LANE_W-1:0][LANE_P_W-1:0] lp16,
  // R4RC32
  input  logic [N32-1:0]                    a32,
  input  logic [N32-1:0]                    b32,
  input  logic                              mode32,
  output logic [2*N32-1:0]                  prod32,
  output logic [N32/LANE_W-1:0][LANE_P_W-1:0] lp32
);

  r4rc_mult #(.N(N16)) u_r4rc16 (
    .in_a        (a16),
    .in_b        (b16),
    .mode_select (mode16),
    .prod        (prod16),
    .lp_prod     (lp16)
  );

  r4rc_mult #(.N(N32)) u_r4rc32 (
    .in_a        (a32),
    .in_b        (b32),
    .mode_select (mode32),
    .prod        (prod32),
    .lp_prod     (lp32)
  );

endmodule
