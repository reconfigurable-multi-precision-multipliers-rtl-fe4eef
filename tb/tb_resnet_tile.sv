// tb_resnet_tile: a 17-layer chain of 3x3 convolutions run on both
// multipliers, following the ResNet-18 precision schedule: layers 1-6 with
// 8-bit activations and weights in low-power mode, layers 7-17 at full width
// (16-bit on R4RC16, 32-bit on R4RC32) in default mode. Two input images are
// processed back to back, so the multipliers switch low-power -> default at
// layer 7 and default -> low-power at the start of the second image.
//
// The tile is H x W pixels with C channels and C output channels, zero
// padding, stride 1. In low-power mode the input channels share one
// evaluation: R4RC16 takes 2 channels per evaluation and R4RC32 takes 4.
// After each layer the sums are requantised (arithmetic shift, then
// saturation to the layer's width) and fed to the next layer. Every output
// value of every layer is compared with a reference convolution computed
// with integer arithmetic in the testbench, and the evaluation count per
// layer is checked against MACs / lanes.
module tb_resnet_tile;
  import r4rc_pkg::*;

  localparam int H = 4, W = 4, C = 4;
  localparam int LAYERS = 17, LP_LAYERS = 6, IMAGES = 2;

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
  int n_sw_up = 0, n_sw_down = 0, n_eval_lp = 0, n_eval_full = 0, n_nonzero = 0;

  typedef logic signed [127:0] wide_t;

  longint act_dut [H][W][C];   // activations computed through the multiplier
  longint act_ref [H][W][C];   // reference activations
  longint wgt     [C][3][3][C];
  wide_t  sum_dut [H][W][C];
  wide_t  sum_ref [H][W][C];

  function automatic longint rand_signed(int width);
    logic [63:0] r;
    r = {$urandom, $urandom};
    return longint'(r << (64 - width)) >>> (64 - width);
  endfunction

  function automatic longint saturate(wide_t v, int width);
    wide_t hi, lo;
    hi = (wide_t'(1) <<< (width - 1)) - 1;
    lo = -(wide_t'(1) <<< (width - 1));
    if (v > hi) return longint'(hi);
    if (v < lo) return longint'(lo);
    return longint'(v);
  endfunction

  // One multiplier evaluation of R4RC16 (sel = 0) or R4RC32 (sel = 1).
  // av/bv hold one operand per lane (low-power) or one operand in [0].
  task automatic evaluate(bit sel, bit lp, longint av [4], longint bv [4], output wide_t res);
    @(posedge clk);
    if (!sel) begin
      mode16 = lp ? MODE_LOW_POWER : MODE_DEFAULT;
      if (lp) begin a16 = {8'(av[1]), 8'(av[0])}; b16 = {8'(bv[1]), 8'(bv[0])}; end
      else    begin a16 = 16'(av[0]); b16 = 16'(bv[0]); end
    end else begin
      mode32 = lp ? MODE_LOW_POWER : MODE_DEFAULT;
      if (lp) begin
        a32 = {8'(av[3]), 8'(av[2]), 8'(av[1]), 8'(av[0])};
        b32 = {8'(bv[3]), 8'(bv[2]), 8'(bv[1]), 8'(bv[0])};
      end else begin a32 = 32'(av[0]); b32 = 32'(bv[0]); end
    end
    @(negedge clk);
    res = 0;
    if (lp) begin
      if (!sel) for (int j = 0; j < 2; j++) res += wide_t'($signed(lp16[j]));
      else      for (int j = 0; j < 4; j++) res += wide_t'($signed(lp32[j]));
      n_eval_lp++;
    end else begin
      res = sel ? wide_t'($signed(prod32)) : wide_t'($signed(prod16));
      n_eval_full++;
    end
  endtask

  task automatic run_layer(bit sel, bit lp);
    int width, lanes, shift, evals, exp_evals;
    width = lp ? 8 : (sel ? 32 : 16);
    lanes = lp ? (sel ? 4 : 2) : 1;
    shift = width + 1;  // keeps activations in range, mostly unsaturated
    for (int co = 0; co < C; co++)
      for (int ky = 0; ky < 3; ky++)
        for (int kx = 0; kx < 3; kx++)
          for (int ci = 0; ci < C; ci++) wgt[co][ky][kx][ci] = rand_signed(width);
    // activations entering a full-width layer from an 8-bit one keep their value
    evals = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        for (int co = 0; co < C; co++) begin
          sum_dut[y][x][co] = 0;
          sum_ref[y][x][co] = 0;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++) begin
              int iy, ix;
              iy = y + ky - 1; ix = x + kx - 1;
              if (iy < 0 || iy >= H || ix < 0 || ix >= W) continue;
              for (int ci = 0; ci < C; ci += lanes) begin
                longint av [4], bv [4];
                wide_t r;
                for (int j = 0; j < 4; j++) begin
                  av[j] = (j < lanes) ? act_dut[iy][ix][ci+j] : 0;
                  bv[j] = (j < lanes) ? wgt[co][ky][kx][ci+j] : 0;
                end
                evaluate(sel, lp, av, bv, r);
                evals++;
                sum_dut[y][x][co] += r;
              end
              for (int ci = 0; ci < C; ci++)
                sum_ref[y][x][co] += wide_t'(act_ref[iy][ix][ci]) * wide_t'(wgt[co][ky][kx][ci]);
            end
        end
    // expected evaluations: C / lanes per tap that lies inside the tile
    exp_evals = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        for (int ky = 0; ky < 3; ky++)
          for (int kx = 0; kx < 3; kx++)
            if (y + ky - 1 >= 0 && y + ky - 1 < H && x + kx - 1 >= 0 && x + kx - 1 < W)
              exp_evals += C * C / lanes;
    checks++;
    if (evals != exp_evals) begin
      failures++; $display("FAIL layer took %0d evaluations, expected %0d", evals, exp_evals);
    end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        for (int co = 0; co < C; co++) begin
          checks++;
          if (sum_dut[y][x][co] != sum_ref[y][x][co]) begin
            failures++;
            $display("FAIL %s lp=%0b (%0d,%0d,%0d) got %0d exp %0d", sel ? "R4RC32" : "R4RC16", lp,
                     y, x, co, sum_dut[y][x][co], sum_ref[y][x][co]);
          end
        end
    // requantise and feed the next layer (next width is 8 only in layers < LP_LAYERS)
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        for (int co = 0; co < C; co++) begin
          act_dut[y][x][co] = saturate(sum_dut[y][x][co] >>> shift, width);
          act_ref[y][x][co] = saturate(sum_ref[y][x][co] >>> shift, width);
          if (act_ref[y][x][co] != 0) n_nonzero++;
        end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; a32 = '0; b32 = '0;
    mode16 = MODE_DEFAULT; mode32 = MODE_DEFAULT;
    for (int sel = 0; sel < 2; sel++) begin
      bit prev_lp;
      prev_lp = 1'b0;
      for (int img = 0; img < IMAGES; img++) begin
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++)
            for (int ci = 0; ci < C; ci++) begin
              act_ref[y][x][ci] = rand_signed(8);
              act_dut[y][x][ci] = act_ref[y][x][ci];
            end
        for (int layer = 1; layer <= LAYERS; layer++) begin
          bit lp;
          lp = (layer <= LP_LAYERS);
          if (lp && !prev_lp) n_sw_down++;
          if (!lp && prev_lp) n_sw_up++;
          prev_lp = lp;
          run_layer(1'(sel), lp);
        end
      end
    end
    $display("mode switches: low-power->default %0d, default->low-power %0d", n_sw_up, n_sw_down);
    $display("evaluations: low-power %0d, default %0d", n_eval_lp, n_eval_full);
    $display("non-zero activations produced: %0d", n_nonzero);
    checks += 5;
    if (n_nonzero == 0)   begin failures++; $display("FAIL all activations are zero"); end
    if (n_sw_up == 0)     begin failures++; $display("FAIL no low-power->default switch"); end
    if (n_sw_down == 0)   begin failures++; $display("FAIL no default->low-power switch"); end
    if (n_eval_lp == 0)   begin failures++; $display("FAIL no low-power evaluation"); end
    if (n_eval_full == 0) begin failures++; $display("FAIL no default evaluation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
