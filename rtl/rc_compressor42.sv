// rc_compressor42: reconfigurable 4-2 compressor.
//
// A 4-2 compressor adds four bits x[3:0] of one column and a carry-in from
// the next lower column:
//   x0 + x1 + x2 + x3 + cin = sum + 2*(carry + cout)
// where cout depends only on x (not on cin), so a row of compressors has no
// rippling carry. It is written in the multiplexer-based form:
//   t1    = x0 ^ x1,  t = t1 ^ x2 ^ x3
//   cout  = t1 ? x2 : x0
//   sum   = t ^ cin
//   carry = t ? cin : x3
//
// Reconfiguration: `en` gates all five inputs. With en = 0 the compressor
// sees only zeros, so its outputs are 0 and its internal nodes hold still;
// the multiplier uses this to switch off the columns a low-power 8-bit
// product does not need. The gating by an enable follows the idea of
// selecting which inputs take part in accumulation; the exact gate-level
// form is this design's own.
//
// Timing: purely combinational.
module rc_compressor42 (
  input  logic [3:0] x,
  input  logic       cin,
  input  logic       en,
  output logic       sum,
  output logic       carry,
  output logic       cout
);

  logic [3:0] xg;
  logic       cg, t1, t;

  always_comb begin
    xg    = x & {4{en}};
    cg    = cin & en;
    t1    = xg[0] ^ xg[1];
    t     = t1 ^ xg[2] ^ xg[3];
    cout  = t1 ? xg[2] : xg[0];
    sum   = t ^ cg;
    carry = t ? cg : xg[3];
  end

endmodule
