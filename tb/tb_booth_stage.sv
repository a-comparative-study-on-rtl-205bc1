// Testbench for booth_stage (default: modified square-root carry-select
// adder): every multiplicand, every triplet and every 9-bit running value.
// Expected: res = acc_in + d * m exactly, lsb = res[1:0],
// acc = res >>> 2 (on 9 bits).
module tb_booth_stage;
  localparam int N = 8;

  logic [N-1:0] m;
  logic [N:0]   acc_in, acc;
  logic [2:0]   trip;
  logic [1:0]   lsb;
  logic [N+1:0] res;
  int checks = 0, failures = 0;

  booth_stage dut (
    .m(m), .acc_in(acc_in), .trip(trip), .lsb(lsb), .acc(acc), .res(res)
  );

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vm = -128; vm < 128; vm++)
      for (int t = 0; t < 8; t++)
        for (int va = -256; va < 256; va++) begin
          int d, r;
          m = N'(vm); trip = 3'(t); acc_in = (N+1)'(va);
          #1;
          d = -2 * (t >> 2) + ((t >> 1) & 1) + (t & 1);
          r = va + d * vm;
          checks++;
          if ($signed(res) !== (N+2)'(r) || lsb !== 2'(r) || acc !== (N+1)'(r >>> 2)) begin
            failures++;
            if (failures < 10)
              $display("FAIL m=%0d trip=%b a=%0d: res=%0d expected %0d", vm, trip, va, $signed(res), r);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
