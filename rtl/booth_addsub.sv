// Adder/subtractor of a Booth partial-product stage.
//
// Two WIDTH-bit adders work side by side: one adds x to a with carry-in 0,
// the other adds the inverted x with carry-in 1, i.e. subtracts x. The
// stage's multiplexer later keeps one of the two. ADDER chooses the adder
// architecture: ADDER_RCA (ripple carry, the first multiplier variant) or
// ADDER_MSQRT_CSLA (modified square-root carry select, the second
// variant; its group split is CSLA_GSIZE, 2/3/4 bits for 9 bits).
//
// Both results are returned one bit wider than the operands. The extra top
// bit is the exact sign of the sum of the sign-extended operands, a ^ b ^
// carry-out, so a stage never loses the sign when |a + x| reaches 2^WIDTH-1
// or more. The adders themselves stay WIDTH bits wide; the extra bit is
// this design's own addition. Combinational.
module booth_addsub
  import booth_pkg::*;
#(
  parameter int unsigned WIDTH        = 9,
  parameter adder_kind_e ADDER        = ADDER_MSQRT_CSLA,
  parameter int unsigned CSLA_NGROUPS = 3,
  parameter int unsigned CSLA_GSIZE [CSLA_NGROUPS] = '{2, 3, 4}
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH:0]   sum,
  output logic [WIDTH:0]   diff
);

  logic [WIDTH-1:0] xn;
  logic [WIDTH-1:0] s_add, s_sub;
  logic             co_add, co_sub;

  assign xn = ~x;

  if (ADDER == ADDER_RCA) begin : g_rca
    rca #(.WIDTH(WIDTH)) u_add (
      .a(a), .b(x),  .cin(1'b0), .sum(s_add), .cout(co_add)
    );
    rca #(.WIDTH(WIDTH)) u_sub (
      .a(a), .b(xn), .cin(1'b1), .sum(s_sub), .cout(co_sub)
    );
  end else begin : g_csla
    msqrt_csla #(.WIDTH(WIDTH), .NGROUPS(CSLA_NGROUPS), .GSIZE(CSLA_GSIZE)) u_add (
      .a(a), .b(x),  .cin(1'b0), .sum(s_add), .cout(co_add)
    );
    msqrt_csla #(.WIDTH(WIDTH), .NGROUPS(CSLA_NGROUPS), .GSIZE(CSLA_GSIZE)) u_sub (
      .a(a), .b(xn), .cin(1'b1), .sum(s_sub), .cout(co_sub)
    );
  end

  assign sum  = {a[WIDTH-1] ^ x[WIDTH-1]  ^ co_add, s_add};
  assign diff = {a[WIDTH-1] ^ xn[WIDTH-1] ^ co_sub, s_sub};

endmodule
