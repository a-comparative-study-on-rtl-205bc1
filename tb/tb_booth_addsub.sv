// Testbench for booth_addsub at 9 bits, both adder architectures: every
// pair of signed operands. Expected: sum = a + x and diff = a - x as exact
// signed 10-bit values (the extra sign bit must be right even where the
// 9-bit result overflows).
module tb_booth_addsub;
  import booth_pkg::*;
  localparam int W = 9;

  logic [W-1:0] a, x;
  logic [W:0]   sum_r, diff_r, sum_c, diff_c;
  int checks = 0, failures = 0;
  int overflows = 0;

  booth_addsub #(.ADDER(ADDER_RCA)) dut_rca (
    .a(a), .x(x), .sum(sum_r), .diff(diff_r)
  );
  booth_addsub dut_csla (
    .a(a), .x(x), .sum(sum_c), .diff(diff_c)
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = -256; va < 256; va++)
      for (int vx = -256; vx < 256; vx++) begin
        logic signed [W:0] es, ed;
        a = W'(va); x = W'(vx);
        #1;
        es = (W+1)'(va + vx);
        ed = (W+1)'(va - vx);
        if (va + vx > 255 || va + vx < -256) overflows++;
        checks++;
        if (sum_r !== es || diff_r !== ed || sum_c !== es || diff_c !== ed) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d x=%0d: rca %0d/%0d csla %0d/%0d expected %0d/%0d", va, vx,
                     $signed(sum_r), $signed(diff_r), $signed(sum_c), $signed(diff_c), es, ed);
        end
      end
    checks++;
    if (overflows == 0) failures++;
    $display("9-bit overflow cases covered: %0d", overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
