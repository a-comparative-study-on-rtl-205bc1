// End-to-end testbench for booth_mult_top at its default size (8 x 8):
// every pair of signed operands goes through both multiplier variants,
// and both products must equal a * b.
//
// It also replays the stage-by-stage Booth algorithm in software to count
// how often each mechanism of the datapath is used, and counts a failure
// for any that never occurs:
//  - in every stage, each Booth digit 0, +1, +2, -1, -2 (stage 1: keep
//    zero, pass M, or negate M or 2M through the two's complement
//    converter; its triplet ends in a constant 0, so it never sees +2;
//    later stages: keep, add or subtract M or 2M);
//  - a stage result outside the 9-bit range, where only the extra sign
//    bit keeps the product right.
module tb_booth_mult_top;
  localparam int N = 8;
  localparam int NST = N / 2;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p_rca, p_csla;
  int checks = 0, failures = 0;
  int digit_count [NST][5];  // index: digit + 2
  int wide_results = 0;

  booth_mult_top dut (.a(a), .b(b), .p_rca(p_rca), .p_csla(p_csla));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (digit_count[s, k]) digit_count[s][k] = 0;

    for (int va = -(1 << (N-1)); va < (1 << (N-1)); va++)
      for (int vb = -(1 << (N-1)); vb < (1 << (N-1)); vb++) begin
        logic signed [2*N-1:0] exp;
        int acc, prev, d;
        logic [N:0] bb;

        a = N'(va); b = N'(vb);
        #1;
        exp = (2*N)'(va * vb);
        checks++;
        if (p_rca !== exp || p_csla !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d * %0d: rca %0d csla %0d expected %0d", va, vb,
                     $signed(p_rca), $signed(p_csla), exp);
        end

        // software replay of the stages, for the coverage counters
        bb = {b, 1'b0};
        acc = 0;
        for (int s = 0; s < NST; s++) begin
          d = -2 * int'(bb[2*s+2]) + int'(bb[2*s+1]) + int'(bb[2*s]);
          digit_count[s][d+2]++;
          prev = acc + d * va;
          if (prev > (1 << N) - 1 || prev < -(1 << N)) wide_results++;
          acc = prev >>> 2;
        end
      end

    for (int s = 0; s < NST; s++)
      for (int k = 0; k < 5; k++) begin
        if (s == 0 && k == 4) continue;  // +2 cannot occur in stage 1
        checks++;
        if (digit_count[s][k] == 0) begin
          failures++;
          $display("digit %0d never used in stage %0d", k - 2, s + 1);
        end
      end
    checks++;
    if (wide_results == 0) begin
      failures++;
      $display("no stage result needed the extra sign bit");
    end
    $display("stage results beyond 9 bits: %0d", wide_results);
    for (int s = 0; s < NST; s++)
      $display("stage %0d digit counts (-2..+2): %0d %0d %0d %0d %0d", s + 1,
               digit_count[s][0], digit_count[s][1], digit_count[s][2],
               digit_count[s][3], digit_count[s][4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
