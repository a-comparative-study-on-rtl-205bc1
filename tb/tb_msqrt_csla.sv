// Testbench for msqrt_csla.
//  - default 16-bit adder (groups 2,2,3,4,5): corner cases that carry
//    across every group boundary, and 100000 random pairs with carry-in
//    0 and 1;
//  - the 9-bit adder of the multiplier (groups 2,3,4): every operand pair
//    with both carry-ins.
// Reference: a + b + cin computed one bit wider.
module tb_msqrt_csla;
  localparam int W = 16;
  localparam int W9 = 9;

  logic [W-1:0]  a, b, sum;
  logic          cin, cout;
  logic [W9-1:0] a9, b9, sum9;
  logic          cin9, cout9;
  int checks = 0, failures = 0;

  localparam int unsigned SPLIT9 [3] = '{2, 3, 4};

  msqrt_csla dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  msqrt_csla #(.WIDTH(9), .NGROUPS(3), .GSIZE(SPLIT9)) dut9 (
    .a(a9), .b(b9), .cin(cin9), .sum(sum9), .cout(cout9)
  );

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL16 %h + %h + %b: got %h expected %h", ta, tb_, tc, {cout, sum}, exp);
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
      check(16'h0003, 16'h0001, c[0]);   // carry out of group 0
      check(16'h000c, 16'h0004, c[0]);   // carry out of group 1
      check(16'h0070, 16'h0010, c[0]);   // carry out of group 2
      check(16'h0780, 16'h0080, c[0]);   // carry out of group 3
    end
    for (int i = 0; i < 100000; i++) begin
      logic [W-1:0] ra, rb;
      ra = W'($urandom);
      rb = W'($urandom);
      check(ra, rb, 1'b0);
      check(ra, rb, 1'b1);
    end
    for (int va = 0; va < 512; va++)
      for (int vb = 0; vb < 512; vb++)
        for (int c = 0; c < 2; c++) begin
          logic [W9:0] exp9;
          a9 = W9'(va); b9 = W9'(vb); cin9 = c[0];
          #1;
          exp9 = (W9+1)'(va + vb + c);
          checks++;
          if ({cout9, sum9} !== exp9) begin
            failures++;
            if (failures < 10)
              $display("FAIL9 %0d + %0d + %0d: got %0d", va, vb, c, {cout9, sum9});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
