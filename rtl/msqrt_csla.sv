// Modified square-root carry-select adder.
//
// The WIDTH-bit word is cut into NGROUPS groups whose sizes grow towards
// the MSB (GSIZE, listed from the LSB). Each group (csla_group) computes
// its carries for both possible carry-ins while the lower groups are still
// busy, so the word carry passes only one AND-NOR select gate per group.
// Growing group sizes let each group finish its longer local chains in the
// time the carry takes to reach it. Defaults: the 16-bit adder of the adder comparison with the
// usual square-root split 2, 2, 3, 4, 5 (the split is this design's
// choice). The 9-bit adders of the multiplier use 2, 3, 4.
//
// Interface: sum = a + b + cin modulo 2^WIDTH, cout is the carry out of
// the top bit. GSIZE must add up to WIDTH. Combinational.
module msqrt_csla #(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned NGROUPS = 5,
  parameter int unsigned GSIZE [NGROUPS] = '{2, 2, 3, 4, 5}
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // index of the lowest bit of group k
  function automatic int unsigned group_lo(int unsigned k);
    int unsigned s = 0;
    for (int unsigned j = 0; j < k; j++)
      s += GSIZE[j];
    return s;
  endfunction

  if (group_lo(NGROUPS) != WIDTH) begin : g_bad_split
    $error("msqrt_csla: group sizes do not add up to WIDTH");
  end

  logic [NGROUPS:0] gc;  // carry into each group

  assign gc[0] = cin;
  assign cout  = gc[NGROUPS];

  for (genvar k = 0; k < NGROUPS; k++) begin : g_group
    localparam int unsigned LO = group_lo(k);
    localparam int unsigned SZ = GSIZE[k];
    csla_group #(.SIZE(SZ)) u_group (
      .a   (a[LO +: SZ]),
      .b   (b[LO +: SZ]),
      .cin (gc[k]),
      .sum (sum[LO +: SZ]),
      .cout(gc[k+1])
    );
  end

endmodule
