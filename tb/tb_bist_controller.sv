// tb_bist_controller: runs the test-per-scan controller with SCAN_LEN = 4 and
// PATTERNS = 3, twice, and checks the exact phase sequence cycle by cycle
// against an expected schedule, the start-to-done latency and the number of
// generator, analyzer and capture cycles.
module tb_bist_controller;
  import bist_pkg::*;
  localparam int L = 4, P = 3;
  logic clk = 0, rst = 1, start = 0;
  logic tpg_en, scan_en, capture, sa_en, sa_clear, busy, done;
  phase_e phase;
  int checks = 0, failures = 0;

  bist_controller #(.SCAN_LEN(L), .PATTERNS(P)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk); #1 rst = 0;
    check(phase == PH_IDLE && !busy && !done, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      int n_tpg, n_sa, n_cap, cyc;
      n_tpg = 0; n_sa = 0; n_cap = 0; cyc = 0;
      start = 1; #1;
      check(sa_clear, "clear with start");
      @(posedge clk); #1 start = 0;
      for (int p = 0; p < P; p++) begin
        for (int b = 0; b < L; b++) begin
          check(phase == PH_SHIFT && tpg_en && scan_en && !capture && busy, "shift");
          check(sa_en == (p != 0), "sa_en during shift");
          n_tpg += tpg_en; n_sa += sa_en; cyc++;
          @(posedge clk); #1;
        end
        check(phase == PH_CAPTURE && capture && !scan_en && !tpg_en && !sa_en, "capture");
        n_cap++; cyc++;
        @(posedge clk); #1;
      end
      for (int b = 0; b < L; b++) begin
        check(phase == PH_UNLOAD && scan_en && sa_en && !tpg_en, "unload");
        n_sa += sa_en; cyc++;
        @(posedge clk); #1;
      end
      check(done && !busy, "done");
      check(cyc == P * (L + 1) + L, "busy length");
      check(n_tpg == P * L && n_sa == P * L && n_cap == P, "event counts");
      repeat (3) @(posedge clk); #1;
      check(done, "done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
