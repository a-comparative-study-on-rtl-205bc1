// First partial-product stage of the radix-4 Booth multiplier.
//
// The running value starts at zero, so this stage needs no adder. Its
// encoder sees the multiplier bits q[1:0] (the bit below them is 0). A
// 2:1 multiplexer forms X = M or 2M on N+1 bits, the binary to two's
// complement converter forms -X, and a 3:1 multiplexer keeps 0, X or -X.
// Its triplet ends in a constant 0, so the digit is 0, +1, -1 or -2:
// 2M is only ever negated. The (N+2)-bit exact result r is split:
// r[1:0] are product bits 1..0, and r shifted right arithmetically by two
// goes to stage 2 as an (N+1)-bit running value. The part list follows the published stage;
// the exact sign bit of r (which holds +2^N for -2 x -2^(N-1)) is this
// design's addition. Combinational.
module booth_stage1
  import booth_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] m,
  input  logic [1:0]   q,
  output logic [1:0]   lsb,
  output logic [N:0]   acc
);

  booth_sel_t   sel;
  logic [N:0]   x, xneg;
  logic         xneg_sign;
  logic [N+1:0] r;

  booth_encoder u_enc (
    .trip({q, 1'b0}),
    .sel (sel)
  );

  // 2:1 multiplexer: M or 2M
  assign x = sel.two ? {m, 1'b0} : {m[N-1], m};

  b2c #(.WIDTH(N + 1)) u_b2c (
    .x     (x),
    .y     (xneg),
    .y_sign(xneg_sign)
  );

  // 3:1 multiplexer: 0, X or -X
  always_comb begin
    unique case (sel.op)
      PP_ADD:  r = {x[N], x};
      PP_SUB:  r = {xneg_sign, xneg};
      default: r = '0;
    endcase
  end

  assign lsb = r[1:0];
  assign acc = {r[N+1], r[N+1:2]};  // r >>> 2, fits N+1 bits

endmodule
