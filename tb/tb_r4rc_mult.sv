// tb_r4rc_mult: checks the reconfigurable multiplier as R4RC16 (default
// parameters) and as R4RC32 (N = 32) against products computed in the
// testbench. Default mode: prod == signed(a) * signed(b). Low-power mode:
// lane j == signed(a[8j+7:8j]) * signed(b[8j+7:8j]), and the other output 0.
// Corner operands (0, -1, most negative, most positive) are mixed with random
// ones, and the mode alternates between vectors.
module tb_r4rc_mult;
  import r4rc_pkg::*;

  logic [15:0]      a16, b16;
  logic [31:0]      a32, b32;
  logic             mode;
  logic [31:0]      prod16;
  logic [63:0]      prod32;
  logic [1:0][15:0] lp16;
  logic [3:0][15:0] lp32;
  int checks = 0, failures = 0;

  r4rc_mult             dut16 (.in_a(a16), .in_b(b16), .mode_select(mode), .prod(prod16), .lp_prod(lp16));
  r4rc_mult #(.N(32))   dut32 (.in_a(a32), .in_b(b32), .mode_select(mode), .prod(prod32), .lp_prod(lp32));

  task automatic check_one(logic [31:0] a, logic [31:0] b, logic m);
    a16 = a[15:0]; b16 = b[15:0]; a32 = a; b32 = b; mode = m;
    #1;
    if (m == MODE_DEFAULT) begin
      longint e16;
      logic [63:0] e32;
      e16 = longint'($signed(a16)) * longint'($signed(b16));
      e32 = 64'(longint'($signed(a32)) * longint'($signed(b32)));
      checks += 4;
      if (prod16 != 32'(e16)) begin failures++; $display("FAIL R4RC16 %h*%h=%h exp %h", a16, b16, prod16, 32'(e16)); end
      if (prod32 != e32)      begin failures++; $display("FAIL R4RC32 %h*%h=%h exp %h", a32, b32, prod32, e32); end
      if (lp16 != '0 || lp32 != '0) begin failures++; $display("FAIL lane outputs not 0 in default mode"); end
      checks--;  // the lane-output check above counts once for both
    end else begin
      for (int j = 0; j < 2; j++) begin
        checks++;
        if (lp16[j] != 16'($signed(a16[8*j +: 8]) * $signed(b16[8*j +: 8]))) begin
          failures++; $display("FAIL R4RC16 lane %0d a=%h b=%h got %h", j, a16, b16, lp16[j]);
        end
      end
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (lp32[j] != 16'($signed(a32[8*j +: 8]) * $signed(b32[8*j +: 8]))) begin
          failures++; $display("FAIL R4RC32 lane %0d a=%h b=%h got %h", j, a32, b32, lp32[j]);
        end
      end
      checks++;
      if (prod16 != '0 || prod32 != '0) begin failures++; $display("FAIL full output not 0 in low-power mode"); end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] c [7];
    c = '{32'h0, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h8080_8080, 32'h7F7F_7F7F, 32'h0000_8000};
    for (int m = 0; m < 2; m++)
      foreach (c[i]) foreach (c[k]) check_one(c[i], c[k], 1'(m));
    for (int r = 0; r < 4000; r++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
