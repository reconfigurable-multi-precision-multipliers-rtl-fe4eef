// tb_booth_pp_decoder: checks the partial-product decoder for N = 16 (its
// default) and N = 32. For every Booth digit in {-2..2} and random and corner
// multiplicands, signed(pp) + neg must equal digit * signed(ia).
module tb_booth_pp_decoder;
  import r4rc_pkg::*;

  booth_digit_t d16, d32;
  logic [15:0]  ia16;
  logic [31:0]  ia32;
  logic [16:0]  pp16;
  logic [32:0]  pp32;
  logic         neg16, neg32;
  int checks = 0, failures = 0;

  booth_pp_decoder                dut16 (.digit(d16), .ia(ia16), .pp(pp16), .neg(neg16));
  booth_pp_decoder #(.N(32))      dut32 (.digit(d32), .ia(ia32), .pp(pp32), .neg(neg32));

  function automatic booth_digit_t make_digit(int v);
    booth_digit_t d;
    d.neg = (v < 0);
    d.one = (v == 1 || v == -1);
    d.two = (v == 2 || v == -2);
    return d;
  endfunction

  task automatic check_one(int v, logic [31:0] a);
    longint got16, exp16, got32, exp32;
    d16 = make_digit(v); d32 = make_digit(v);
    ia16 = a[15:0]; ia32 = a;
    #1;
    got16 = longint'($signed(pp16)) + longint'(neg16);
    exp16 = longint'(v) * longint'($signed(ia16));
    got32 = longint'($signed(pp32)) + longint'(neg32);
    exp32 = longint'(v) * longint'($signed(ia32));
    checks += 2;
    if (got16 != exp16) begin
      failures++;
      $display("FAIL N=16 d=%0d ia=%h got=%0d exp=%0d", v, ia16, got16, exp16);
    end
    if (got32 != exp32) begin
      failures++;
      $display("FAIL N=32 d=%0d ia=%h got=%0d exp=%0d", v, ia32, got32, exp32);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corners [6];
    corners = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_8000, 32'h7FFF_7FFF, 32'h0000_8000};
    for (int v = -2; v <= 2; v++) begin
      foreach (corners[c]) check_one(v, corners[c]);
      for (int r = 0; r < 200; r++) check_one(v, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
