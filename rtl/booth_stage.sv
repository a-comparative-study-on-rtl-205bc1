// Later partial-product stage (stages 2 .. N/2) of the radix-4 Booth
// multiplier.
//
// The encoder reads the Booth triplet {q[2i+1], q[2i], q[2i-1]}. A 2:1
// multiplexer forms X = M or 2M on N+1 bits, the adder/subtractor forms
// A + X and A - X at the same time (two adders, carry-in 0 and 1), and a
// 3:1 multiplexer keeps A, A + X or A - X. The (N+2)-bit exact result
// 'res' gives two product bits (res[1:0]) and, shifted right
// arithmetically by two, the running value for the next stage. In the
// last stage 'res' itself holds the upper product bits.
//
// The encoder, adder/subtractor and 3:1 multiplexer follow the published
// stage; using a 2:1 M/2M multiplexer here too, and carrying the exact
// sign bit, are this design's choices. ADDER selects the adder type (see
// booth_addsub). Combinational.
module booth_stage
  import booth_pkg::*;
#(
  parameter int unsigned N            = 8,
  parameter adder_kind_e ADDER        = ADDER_MSQRT_CSLA,
  parameter int unsigned CSLA_NGROUPS = 3,
  parameter int unsigned CSLA_GSIZE [CSLA_NGROUPS] = '{2, 3, 4}
) (
  input  logic [N-1:0] m,
  input  logic [N:0]   acc_in,
  input  logic [2:0]   trip,
  output logic [1:0]   lsb,
  output logic [N:0]   acc,
  output logic [N+1:0] res
);

  booth_sel_t   sel;
  logic [N:0]   x;
  logic [N+1:0] sum, diff;

  booth_encoder u_enc (
    .trip(trip),
    .sel (sel)
  );

  // 2:1 multiplexer: M or 2M
  assign x = sel.two ? {m, 1'b0} : {m[N-1], m};

  booth_addsub #(
    .WIDTH       (N + 1),
    .ADDER       (ADDER),
    .CSLA_NGROUPS(CSLA_NGROUPS),
    .CSLA_GSIZE  (CSLA_GSIZE)
  ) u_addsub (
    .a   (acc_in),
    .x   (x),
    .sum (sum),
    .diff(diff)
  );

  // 3:1 multiplexer: A, A + X or A - X
  always_comb begin
    unique case (sel.op)
      PP_ADD:  res = sum;
      PP_SUB:  res = diff;
      default: res = {acc_in[N], acc_in};
    endcase
  end

  assign lsb = res[1:0];
  assign acc = {res[N+1], res[N+1:2]};  // res >>> 2, fits N+1 bits

endmodule
