// Testbench for radix4_booth_mult: every pair of signed 8-bit operands for
// both adder variants (ripple carry and the default carry-select), plus
// every pair for a 4 x 4 instance to exercise the generic stage count.
// Reference: the signed product a * b.
module tb_radix4_booth_mult;
  import booth_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] p_rca, p_csla;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int checks = 0, failures = 0;

  localparam int unsigned SPLIT5 [2] = '{2, 3};

  radix4_booth_mult #(.ADDER(ADDER_RCA)) dut_rca (.a(a), .b(b), .p(p_rca));
  radix4_booth_mult dut_csla (.a(a), .b(b), .p(p_csla));
  radix4_booth_mult #(.N(4), .CSLA_NGROUPS(2), .CSLA_GSIZE(SPLIT5)) dut4 (
    .a(a4), .b(b4), .p(p4)
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = -128; va < 128; va++)
      for (int vb = -128; vb < 128; vb++) begin
        logic signed [15:0] exp;
        a = 8'(va); b = 8'(vb);
        #1;
        exp = 16'(va * vb);
        checks++;
        if (p_rca !== exp || p_csla !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d * %0d: rca %0d csla %0d expected %0d", va, vb,
                     $signed(p_rca), $signed(p_csla), exp);
        end
      end
    for (int va = -8; va < 8; va++)
      for (int vb = -8; vb < 8; vb++) begin
        a4 = 4'(va); b4 = 4'(vb);
        #1;
        checks++;
        if (p4 !== 8'(va * vb)) begin
          failures++;
          $display("FAIL4 %0d * %0d: got %0d", va, vb, $signed(p4));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
