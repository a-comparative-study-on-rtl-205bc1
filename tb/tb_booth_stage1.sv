// Testbench for booth_stage1: every multiplicand with every value of the
// two low multiplier bits. Expected: r = d * m with d the Booth digit of
// {q[1], q[0], 0}; lsb = r[1:0], acc = r >>> 2.
module tb_booth_stage1;
  localparam int N = 8;

  logic [N-1:0] m;
  logic [1:0]   q, lsb;
  logic [N:0]   acc;
  int checks = 0, failures = 0;

  booth_stage1 dut (.m(m), .q(q), .lsb(lsb), .acc(acc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vm = -128; vm < 128; vm++)
      for (int vq = 0; vq < 4; vq++) begin
        int d, r;
        m = N'(vm); q = 2'(vq);
        #1;
        d = -2 * (vq >> 1) + (vq & 1);
        r = d * vm;
        checks++;
        if (lsb !== 2'(r) || int'($signed(acc)) !== (r >>> 2)) begin
          failures++;
          if (failures < 10)
            $display("FAIL m=%0d q=%b: lsb=%b acc=%0d expected r=%0d", vm, q, lsb, $signed(acc), r);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
