// One group of the modified square-root carry-select adder.
//
// The group adds two SIZE-bit slices. It does not wait for its carry-in:
//   1. propagate/generate: p = a ^ b, g = a & b;
//   2. two carry chains in NAND-NAND form, c0 assuming carry-in 0 and c1
//      assuming carry-in 1 (c1 starts from a | b);
//   3. when the carry-in arrives, an AND-NOR (AOI) gate per bit selects
//      the real carry in inverted form: nc = ~(c0 | (c1 & cin)), which is
//      valid because c1 >= c0 bit by bit;
//   4. the sum bit is XNOR(p, inverted carry from the bit below).
// The five parts follow the adder's published structure; the exact gate
// equations are this design's reading of it. Combinational; the only path
// from cin is one AOI gate and one XNOR per bit. SIZE must be at least 2.
module csla_group #(
  parameter int unsigned SIZE = 4
) (
  input  logic [SIZE-1:0] a,
  input  logic [SIZE-1:0] b,
  input  logic            cin,
  output logic [SIZE-1:0] sum,
  output logic            cout
);

  logic [SIZE-1:0] p, g;
  logic [SIZE-1:0] c0, c1;  // carries out of each bit for carry-in 0 / 1
  logic [SIZE-1:0] nc;      // selected carry, inverted

  if (SIZE < 2) begin : g_bad_size
    $error("csla_group: SIZE must be at least 2");
  end

  assign p = a ^ b;
  assign g = a & b;

  assign c0[0] = g[0];
  assign c1[0] = ~(~g[0] & ~p[0]);
  for (genvar i = 1; i < SIZE; i++) begin : g_chain
    assign c0[i] = ~(~g[i] & ~(p[i] & c0[i-1]));
    assign c1[i] = ~(~g[i] & ~(p[i] & c1[i-1]));
  end

  // carry select (AND-NOR) and sum (XNOR)
  assign nc     = ~(c0 | (c1 & {SIZE{cin}}));
  assign sum    = p ~^ {nc[SIZE-2:0], ~cin};
  assign cout   = ~nc[SIZE-1];

endmodule
