// Radix-4 Booth recoder.
//
// Reads one overlapping multiplier triplet {q[2i+1], q[2i], q[2i-1]} and
// gives the Booth digit d in {0, +1, +2, -1, -2} as select signals for the
// partial-product stage:
//   000, 111 -> 0      001, 010 -> +1     011 -> +2
//   100      -> -2     101, 110 -> -1
// 'two' is set for |d| = 2, 'op' says keep / add / subtract. The digit
// table is the standard radix-4 recoding the multiplier is built on; the
// select encoding is this design's own. Purely combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]  trip,
  output booth_sel_t  sel
);

  logic nonzero;

  always_comb begin
    // |d| = 2 when the two low bits agree and differ from the top bit
    sel.two = (trip[1] ~^ trip[0]) & (trip[2] ^ trip[1]);
    nonzero = ~((trip[2] ~^ trip[1]) & (trip[1] ~^ trip[0]));
    if (!nonzero)
      sel.op = PP_ZERO;
    else if (trip[2])
      sel.op = PP_SUB;
    else
      sel.op = PP_ADD;
  end

endmodule
