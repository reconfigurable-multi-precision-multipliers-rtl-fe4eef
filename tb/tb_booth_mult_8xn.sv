// tb_booth_mult_8xn: checks the 8xN Booth multiplier at N = 16 (defaults,
// low-power lane 0) and N = 32 (low-power lane at bit 24), in both modes.
// Default mode: p == signed(ia) * (signed(ib[8:1]) + ib[0]), the Booth value
// of the 9-bit slice, as an N+8 bit two's-complement number.
// Low-power mode: p[15:0] == signed(ia lane) * signed(ib[8:1]) and the upper
// bits of p are 0.
module tb_booth_mult_8xn;
  import r4rc_pkg::*;

  logic [15:0] ia16;
  logic [31:0] ia32;
  logic [8:0]  ib;
  logic        mode;
  logic [23:0] p16;
  logic [39:0] p32;
  int checks = 0, failures = 0;

  booth_mult_8xn                        dut16 (.ia(ia16), .ib(ib), .mode_select(mode), .p(p16));
  booth_mult_8xn #(.N(32), .A_LP_LSB(24)) dut32 (.ia(ia32), .ib(ib), .mode_select(mode), .p(p32));

  task automatic check_one(logic [31:0] a, logic [8:0] b, logic m);
    longint bval, e16, e32;
    ia16 = a[15:0]; ia32 = a; ib = b; mode = m;
    #1;
    if (m == MODE_DEFAULT) begin
      bval = longint'($signed(b[8:1])) + longint'(b[0]);
      e16  = longint'($signed(ia16)) * bval;
      e32  = longint'($signed(ia32)) * bval;
      checks += 2;
      if (p16 != 24'(e16)) begin
        failures++;
        $display("FAIL N=16 full ia=%h ib=%b p=%h exp=%h", ia16, b, p16, 24'(e16));
      end
      if (p32 != 40'(e32)) begin
        failures++;
        $display("FAIL N=32 full ia=%h ib=%b p=%h exp=%h", ia32, b, p32, 40'(e32));
      end
    end else begin
      e16 = longint'($signed(a[7:0]))   * longint'($signed(b[8:1]));
      e32 = longint'($signed(a[31:24])) * longint'($signed(b[8:1]));
      checks += 2;
      if (p16 != {8'h0, 16'(e16)}) begin
        failures++;
        $display("FAIL N=16 lp ia=%h ib=%b p=%h exp=%h", ia16, b, p16, 16'(e16));
      end
      if (p32 != {24'h0, 16'(e32)}) begin
        failures++;
        $display("FAIL N=32 lp ia=%h ib=%b p=%h exp=%h", ia32, b, p32, 16'(e32));
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ca [6];
    logic [8:0]  cb [7];
    ca = '{32'h0, 32'hFFFF_FFFF, 32'h8000_0080, 32'h7FFF_FF7F, 32'h80FF_7F01, 32'h1234_5678};
    cb = '{9'h000, 9'h1FF, 9'h100, 9'h0FF, 9'h101, 9'h0AA, 9'h155};
    for (int m = 0; m < 2; m++)
      foreach (ca[i]) foreach (cb[k]) check_one(ca[i], cb[k], 1'(m));
    for (int r = 0; r < 3000; r++) check_one($urandom, 9'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
