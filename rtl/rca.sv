// Ripple-carry adder.
//
// A chain of WIDTH full adders; the carry ripples from bit 0 to the top,
// so the delay grows linearly with WIDTH. This is the adder of the first
// multiplier variant and the 16-bit reference point of the adder
// comparison (WIDTH defaults to 16). Interface: sum = a + b + cin modulo
// 2^WIDTH, cout is the carry out of the top bit. Combinational.
module rca #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;
  assign cout = c[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

endmodule
