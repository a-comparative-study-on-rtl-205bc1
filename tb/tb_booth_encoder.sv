// Testbench for booth_encoder: all eight triplets. The expected Booth
// digit is computed arithmetically, d = -2*t[2] + t[1] + t[0], and
// compared with the encoder's 'two' and 'op' outputs.
module tb_booth_encoder;
  import booth_pkg::*;

  logic [2:0] trip;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.trip(trip), .sel(sel));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int d;
      pp_op_e exp_op;
      trip = 3'(t);
      #1;
      d = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      exp_op = (d == 0) ? PP_ZERO : (d > 0 ? PP_ADD : PP_SUB);
      checks++;
      if (sel.op != exp_op || (d != 0 && sel.two != (d == 2 || d == -2))) begin
        failures++;
        $display("FAIL trip=%b digit=%0d: two=%b op=%s", trip, d, sel.two, sel.op.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
