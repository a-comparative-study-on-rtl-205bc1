// Testbench for b2c at its default 9 bits: every input value. Checks that
// y = -x modulo 2^9 and that {y_sign, y} is the exact 10-bit value -x,
// including -(-256) = +256.
module tb_b2c;
  localparam int W = 9;

  logic [W-1:0] x, y;
  logic         y_sign;
  int checks = 0, failures = 0;

  b2c dut (.x(x), .y(y), .y_sign(y_sign));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      logic signed [W:0] exact;
      x = W'(v);
      #1;
      exact = -($signed({x[W-1], x}));
      checks++;
      if ({y_sign, y} !== exact) begin
        failures++;
        $display("FAIL x=%0d: got %0d expected %0d", $signed(x), $signed({y_sign, y}), exact);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
