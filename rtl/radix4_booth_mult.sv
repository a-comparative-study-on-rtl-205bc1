// Radix-4 Booth multiplier, N x N bits, two's complement (default 8 x 8).
//
// The shift-and-add form of radix-4 Booth multiplication is unrolled into
// N/2 combinational stages. The running value A starts at zero; stage i
// recodes multiplier bits {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0) into a
// digit d in {0, +-1, +-2}, adds d x M to A and shifts A right by two.
// The two bits shifted out are final product bits, so stages 1 .. N/2-1
// each retire two low product bits and the last stage's full result
// supplies the rest:
//   p[2i+1:2i] = lsb of stage i+1        (i = 0 .. N/2-2)
//   p[2N-1:N-2] = exact result of the last stage
// Stage 1 has no adder (A = 0). Every later stage holds an N+1-bit
// adder/subtractor whose architecture is ADDER: ADDER_RCA gives the
// ripple-carry variant, ADDER_MSQRT_CSLA (default) the modified
// square-root carry-select variant with group split CSLA_GSIZE (2, 3, 4
// for the 9-bit adders).
//
// Interface: a is the multiplicand M, b the multiplier, p = a * b, all
// signed. No clock: the product is valid one combinational delay after
// the operands. N must be even and at least 4.
module radix4_booth_mult
  import booth_pkg::*;
#(
  parameter int unsigned N            = 8,
  parameter adder_kind_e ADDER        = ADDER_MSQRT_CSLA,
  parameter int unsigned CSLA_NGROUPS = 3,
  parameter int unsigned CSLA_GSIZE [CSLA_NGROUPS] = '{2, 3, 4}
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned NSTAGES = N / 2;

  if (N % 2 != 0 || N < 4) begin : g_bad_n
    $error("radix4_booth_mult: N must be even and at least 4");
  end

  logic [N:0]   acc [NSTAGES];  // running value after each stage
  logic [1:0]   lsb [NSTAGES];
  logic [N+1:0] res [1:NSTAGES-1];  // exact results of stages 2 .. N/2

  booth_stage1 #(.N(N)) u_stage1 (
    .m  (a),
    .q  (b[1:0]),
    .lsb(lsb[0]),
    .acc(acc[0])
  );

  for (genvar s = 1; s < NSTAGES; s++) begin : g_stage
    booth_stage #(
      .N           (N),
      .ADDER       (ADDER),
      .CSLA_NGROUPS(CSLA_NGROUPS),
      .CSLA_GSIZE  (CSLA_GSIZE)
    ) u_stage (
      .m     (a),
      .acc_in(acc[s-1]),
      .trip  (b[2*s+1 -: 3]),
      .lsb   (lsb[s]),
      .acc   (acc[s]),
      .res   (res[s])
    );
  end

  for (genvar s = 0; s < NSTAGES - 1; s++) begin : g_lsb
    assign p[2*s +: 2] = lsb[s];
  end
  assign p[2*N-1 : N-2] = res[NSTAGES-1];

endmodule
