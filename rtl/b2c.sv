// Binary to two's complement converter (negation without an adder).
//
// -x is formed by the copy-then-invert rule: scanning from the LSB, every
// bit up to and including the lowest 1 is passed unchanged and every bit
// above it is inverted. A prefix-OR chain marks "a 1 has been seen below
// this bit", and each output bit is the input bit XOR that mark, so no
// carry chain is needed.
//
// y is -x modulo 2^WIDTH. y_sign is the sign of the exact (WIDTH+1)-bit
// result: it is 1 exactly when x is positive. It lets the caller negate
// the most negative value (-2^(WIDTH-1) -> +2^(WIDTH-1)) without overflow;
// this extra output is this design's own addition. Combinational.
module b2c #(
  parameter int unsigned WIDTH = 9
) (
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y,
  output logic             y_sign
);

  logic [WIDTH-1:0] seen;  // seen[i]: some x[j] = 1 with j < i

  assign seen[0] = 1'b0;
  for (genvar i = 1; i < WIDTH; i++) begin : g_seen
    assign seen[i] = seen[i-1] | x[i-1];
  end

  assign y      = x ^ seen;
  assign y_sign = ~x[WIDTH-1] & seen[WIDTH-1];

endmodule
