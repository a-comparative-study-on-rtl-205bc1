// Both radix-4 Booth multiplier variants, side by side.
//
// The design compares one 8 x 8 Booth multiplier built in two ways: with
// ripple-carry adder/subtractors (p_rca) and with modified square-root
// carry-select adder/subtractors (p_csla). Both take the same signed
// operands and must give the same signed product; they differ only in
// critical path, area and power. Holding both in one top keeps the pair
// comparable under identical inputs; the carry-select one is the faster
// and preferred variant. Combinational, no clock or reset. N is 8; any
// other even N also needs a carry-select group split adding up to N+1
// (radix4_booth_mult's CSLA_GSIZE, 2/3/4 by default).
module booth_mult_top
  import booth_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p_rca,
  output logic [2*N-1:0] p_csla
);

  radix4_booth_mult #(.N(N), .ADDER(ADDER_RCA)) u_mult_rca (
    .a(a),
    .b(b),
    .p(p_rca)
  );

  radix4_booth_mult #(.N(N), .ADDER(ADDER_MSQRT_CSLA)) u_mult_csla (
    .a(a),
    .b(b),
    .p(p_csla)
  );

endmodule
