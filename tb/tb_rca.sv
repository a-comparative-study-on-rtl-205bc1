// Testbench for rca at its default 16 bits: corner cases (all-ones carry
// propagation, zero, top-bit carries) and 100000 random operand pairs,
// each with carry-in 0 and 1. Reference: a + b + cin on 17 bits.
module tb_rca;
  localparam int W = 16;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h + %b: got %h expected %h", ta, tb_, tc, {cout, sum}, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      check('1, '0, c[0]);
      check('1, 16'd1, c[0]);
      check('1, '1, c[0]);
      check('0, '0, c[0]);
      check(16'h8000, 16'h8000, c[0]);
      check(16'h5555, 16'haaaa, c[0]);
      check(16'h7fff, 16'h0001, c[0]);
    end
    for (int i = 0; i < 100000; i++) begin
      logic [W-1:0] ra, rb;
      ra = W'($urandom);
      rb = W'($urandom);
      check(ra, rb, 1'b0);
      check(ra, rb, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
