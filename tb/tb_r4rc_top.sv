// tb_r4rc_top: end-to-end test of both multipliers at their default sizes.
//
// It runs the precision schedule of a 17-layer ResNet-18-style inference
// twice: layers 1-6 in low-power (8-bit) mode and layers 7-17 in default
// mode, so every inference switches low-power -> default once, and the start
// of the next inference switches default -> low-power. Each layer computes a
// dot product of MACS terms on R4RC16 and on R4RC32, one multiplier
// evaluation per clock cycle, and accumulates the multiplier outputs in the
// testbench. The sums are compared with dot products computed directly from
// the operand arrays.
//
// Rate: in low-power mode one evaluation yields 2 (R4RC16) or 4 (R4RC32)
// 8x8 products, so a layer of MACS 8-bit terms takes MACS/2 and MACS/4
// cycles; in default mode it takes MACS cycles. These cycle counts are
// checked per layer. Every mechanism (both mode switches, both modes on both
// multipliers, the most negative operands in each mode) is counted, and one
// that never happened counts as a failure.
module tb_r4rc_top;
  import r4rc_pkg::*;

  localparam int LAYERS     = 17;
  localparam int LP_LAYERS  = 6;
  localparam int INFERENCES = 2;
  localparam int MACS       = 32;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0]      a16, b16;
  logic [31:0]      a32, b32;
  logic             mode16, mode32;
  logic [31:0]      prod16;
  logic [63:0]      prod32;
  logic [1:0][15:0] lp16;
  logic [3:0][15:0] lp32;

  r4rc_top dut (
    .a16(a16), .b16(b16), .mode16(mode16), .prod16(prod16), .lp16(lp16),
    .a32(a32), .b32(b32), .mode32(mode32), .prod32(prod32), .lp32(lp32)
  );

  int checks = 0, failures = 0;
  int n_sw_up = 0, n_sw_down = 0;        // low-power->default, default->low-power
  int n_lp16 = 0, n_lp32 = 0, n_full16 = 0, n_full32 = 0;
  int n_lp_prod16 = 0, n_lp_prod32 = 0;  // 8x8 products delivered
  int n_min_lp = 0, n_min_full = 0;      // most negative operands seen

  // Operand arrays of one layer (activations x weights).
  logic [31:0] act [MACS];
  logic [31:0] wgt [MACS];

  task automatic fill_layer(int width);
    for (int i = 0; i < MACS; i++) begin
      act[i] = $urandom;
      wgt[i] = $urandom;
      if ($urandom_range(0, 7) == 0) begin
        act[i] = (width == 8) ? 32'hFFFF_FF80 : (($urandom_range(0, 1) != 0) ? 32'hFFFF_8000 : 32'h8000_0000);
        wgt[i] = act[i];
      end
    end
  endtask

  function automatic longint sx(logic [31:0] v, int width);
    case (width)
      8:       return longint'($signed(v[7:0]));
      16:      return longint'($signed(v[15:0]));
      default: return longint'($signed(v));
    endcase
  endfunction

  // One layer on both multipliers; returns nothing, checks everything.
  task automatic run_layer(bit low_power);
    longint ref16, ref32, acc16, acc32;
    int cyc16, cyc32, idx;
    logic m;
    m = low_power ? MODE_LOW_POWER : MODE_DEFAULT;
    fill_layer(low_power ? 8 : 32);
    ref16 = 0; ref32 = 0;
    for (int i = 0; i < MACS; i++) begin
      ref16 += sx(act[i], low_power ? 8 : 16) * sx(wgt[i], low_power ? 8 : 16);
      ref32 += sx(act[i], low_power ? 8 : 32) * sx(wgt[i], low_power ? 8 : 32);
    end
    acc16 = 0; acc32 = 0; cyc16 = 0; cyc32 = 0;

    // R4RC16: 2 lanes (low-power) or 1 product (default) per cycle
    idx = 0;
    while (idx < MACS) begin
      @(posedge clk);
      mode16 = m;
      if (low_power) begin
        a16 = {act[idx+1][7:0], act[idx][7:0]};
        b16 = {wgt[idx+1][7:0], wgt[idx][7:0]};
      end else begin
        a16 = act[idx][15:0];
        b16 = wgt[idx][15:0];
      end
      @(negedge clk);
      if (low_power) begin
        for (int j = 0; j < 2; j++) begin
          acc16 += longint'($signed(lp16[j]));
          if (act[idx+j][7:0] == 8'h80 && wgt[idx+j][7:0] == 8'h80) n_min_lp++;
        end
        n_lp16++; n_lp_prod16 += 2; idx += 2;
      end else begin
        acc16 += longint'($signed(prod16));
        if (a16 == 16'h8000 && b16 == 16'h8000) n_min_full++;
        n_full16++; idx += 1;
      end
      cyc16++;
    end

    // R4RC32: 4 lanes (low-power) or 1 product (default) per cycle
    idx = 0;
    while (idx < MACS) begin
      @(posedge clk);
      mode32 = m;
      if (low_power) begin
        for (int j = 0; j < 4; j++) begin
          a32[8*j +: 8] = act[idx+j][7:0];
          b32[8*j +: 8] = wgt[idx+j][7:0];
        end
      end else begin
        a32 = act[idx];
        b32 = wgt[idx];
      end
      @(negedge clk);
      if (low_power) begin
        for (int j = 0; j < 4; j++) acc32 += longint'($signed(lp32[j]));
        n_lp32++; n_lp_prod32 += 4; idx += 4;
      end else begin
        acc32 += longint'(prod32);
        if (a32 == 32'h8000_0000 && b32 == 32'h8000_0000) n_min_full++;
        n_full32++; idx += 1;
      end
      cyc32++;
    end

    checks += 4;
    if (acc16 != ref16) begin failures++; $display("FAIL R4RC16 dot product %0d exp %0d (lp=%0b)", acc16, ref16, low_power); end
    if (acc32 != ref32) begin failures++; $display("FAIL R4RC32 dot product %0d exp %0d (lp=%0b)", acc32, ref32, low_power); end
    if (cyc16 != (low_power ? MACS / 2 : MACS)) begin failures++; $display("FAIL R4RC16 took %0d cycles", cyc16); end
    if (cyc32 != (low_power ? MACS / 4 : MACS)) begin failures++; $display("FAIL R4RC32 took %0d cycles", cyc32); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prev_lp;
    a16 = '0; b16 = '0; a32 = '0; b32 = '0;
    mode16 = MODE_DEFAULT; mode32 = MODE_DEFAULT;
    prev_lp = 1'b0;
    for (int inf = 0; inf < INFERENCES; inf++) begin
      for (int layer = 1; layer <= LAYERS; layer++) begin
        bit lp;
        lp = (layer <= LP_LAYERS);
        if (lp && !prev_lp) n_sw_down++;
        if (!lp && prev_lp) n_sw_up++;
        prev_lp = lp;
        run_layer(lp);
      end
    end

    checks += 2;
    if (n_lp_prod16 != 2 * n_lp16) begin failures++; $display("FAIL R4RC16 rate"); end
    if (n_lp_prod32 != 4 * n_lp32) begin failures++; $display("FAIL R4RC32 rate"); end

    $display("mode switches: low-power->default %0d, default->low-power %0d", n_sw_up, n_sw_down);
    $display("R4RC16 evaluations: low-power %0d (%0d products), default %0d", n_lp16, n_lp_prod16, n_full16);
    $display("R4RC32 evaluations: low-power %0d (%0d products), default %0d", n_lp32, n_lp_prod32, n_full32);
    $display("most-negative operand pairs: low-power %0d, default %0d", n_min_lp, n_min_full);
    checks += 8;
    if (n_sw_up == 0)    begin failures++; $display("FAIL no low-power->default switch"); end
    if (n_sw_down == 0)  begin failures++; $display("FAIL no default->low-power switch"); end
    if (n_lp16 == 0)     begin failures++; $display("FAIL R4RC16 never in low-power mode"); end
    if (n_lp32 == 0)     begin failures++; $display("FAIL R4RC32 never in low-power mode"); end
    if (n_full16 == 0)   begin failures++; $display("FAIL R4RC16 never in default mode"); end
    if (n_full32 == 0)   begin failures++; $display("FAIL R4RC32 never in default mode"); end
    if (n_min_lp == 0)   begin failures++; $display("FAIL no most-negative 8-bit pair"); end
    if (n_min_full == 0) begin failures++; $display("FAIL no most-negative full-width pair"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
