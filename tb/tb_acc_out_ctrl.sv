// tb_acc_out_ctrl: checks the accumulator and output control for N = 16 and
// N = 32 with random slice products. Default mode: prod is the sum of the
// sign-extended p[j] shifted by 8j, lane outputs are 0. Low-power mode: lane
// output j is p[j][15:0] and prod is 0.
module tb_acc_out_ctrl;
  import r4rc_pkg::*;

  logic [1:0][23:0]  p16;
  logic [3:0][39:0]  p32;
  logic              mode;
  logic [31:0]       prod16;
  logic [63:0]       prod32;
  logic [1:0][15:0]  lp16;
  logic [3:0][15:0]  lp32;
  int checks = 0, failures = 0;

  acc_out_ctrl              dut16 (.p(p16), .mode_select(mode), .prod(prod16), .lp_prod(lp16));
  acc_out_ctrl #(.N(32))    dut32 (.p(p32), .mode_select(mode), .prod(prod32), .lp_prod(lp32));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2000; r++) begin
      logic [63:0] e16, e32;
      mode = 1'(r & 1);
      for (int j = 0; j < 2; j++) p16[j] = 24'({$urandom, $urandom});
      for (int j = 0; j < 4; j++) p32[j] = 40'({$urandom, $urandom});
      if (r < 4) begin  // extreme slice products
        for (int j = 0; j < 2; j++) p16[j] = (r < 2) ? 24'h800000 : 24'h7FFFFF;
        for (int j = 0; j < 4; j++) p32[j] = (r < 2) ? 40'h80_0000_0000 : 40'h7F_FFFF_FFFF;
      end
      #1;
      e16 = 0; e32 = 0;
      for (int j = 0; j < 2; j++) e16 += 64'($signed(p16[j])) << (8 * j);
      for (int j = 0; j < 4; j++) e32 += 64'($signed(p32[j])) << (8 * j);
      if (mode == MODE_DEFAULT) begin
        checks += 4;
        if (prod16 != e16[31:0]) begin failures++; $display("FAIL prod16 %h exp %h", prod16, e16[31:0]); end
        if (prod32 != e32)       begin failures++; $display("FAIL prod32 %h exp %h", prod32, e32); end
        if (lp16 != '0) begin failures++; $display("FAIL lp16 not 0 in default mode"); end
        if (lp32 != '0) begin failures++; $display("FAIL lp32 not 0 in default mode"); end
      end else begin
        for (int j = 0; j < 2; j++) begin
          checks++;
          if (lp16[j] != p16[j][15:0]) begin failures++; $display("FAIL lp16[%0d]", j); end
        end
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (lp32[j] != p32[j][15:0]) begin failures++; $display("FAIL lp32[%0d]", j); end
        end
        checks += 2;
        if (prod16 != '0) begin failures++; $display("FAIL prod16 not 0 in low-power mode"); end
        if (prod32 != '0) begin failures++; $display("FAIL prod32 not 0 in low-power mode"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
