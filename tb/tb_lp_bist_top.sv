// tb_lp_bist_top: end-to-end test of the complete BIST at its default sizes
// (degree 33, Q = 5, 33 scan cells, 1000 patterns) against the behavioural
// circuit under test. Every pattern bit on the scan input is compared with a
// standard LFSR, the scan chain and circuit are modelled in software, and the
// final signature must equal the remainder of the whole response stream divided
// by the analyzer polynomial. Runs the test twice (restart without reset) and
// counts shift, capture, unload, generator steps, done and restart.
module tb_lp_bist_top;
  import bist_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = bist_pkg::DEF_N, Q = bist_pkg::DEF_Q, L = bist_pkg::DEF_SCAN_LEN, P = bist_pkg::DEF_PATTERNS;
  localparam logic [N:0] POLY = bist_pkg::DEF_POLY;
  localparam logic [N-1:0] SEED = N'(bist_pkg::DEF_SEED);
  localparam int RUN_CYCLES = P * (L + 1) + L;

  logic clk = 0, rst = 1, start = 0;
  logic scan_en, scan_in, capture, scan_out, busy, done, tpg_group_start;
  phase_e phase;
  logic [Q-1:0] tpg_group;
  logic [N-1:0] signature;
  int checks = 0, failures = 0;
  // how often each mechanism happened
  int n_shift = 0, n_capture = 0, n_unload = 0, n_gen_step = 0, n_done = 0, n_restart = 0;

  lp_bist_top  dut (.*);
  cut_model #(.LEN(L)) cut (.clk, .rst, .scan_en, .scan_in, .capture, .scan_out);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3 * RUN_CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // software model of the scan chain and circuit under test
  bit chain[L];
  function automatic void sw_capture();
    bit nx[L];
    for (int i = 0; i < L; i++)
      nx[i] = chain[i] ^ (chain[(i + 1) % L] & chain[(i + 2) % L]) ^ chain[(i + 3) % L];
    chain = nx;
  endfunction

  logic [63:0] ref_st;

  task automatic run_once(input int run);
    bit stream[$];
    bit d[];
    logic [63:0] exp;
    logic b;
    int cyc = 0;
    start = 1;
    @(posedge clk); #1 start = 0;
    if (run > 0) n_restart++;
    for (int p = 0; p < P; p++) begin
      for (int k = 0; k < L; k++) begin
        check(phase == PH_SHIFT && scan_en, "shift phase");
        ref_st = lfsr_step(ref_st, N, 65'(POLY), b);
        check(scan_in == b, "pattern bit");
        if (tpg_group_start) n_gen_step++;
        if (p > 0) stream.push_back(chain[L-1]);
        for (int i = L - 1; i > 0; i--) chain[i] = chain[i-1];
        chain[0] = b;
        n_shift++; cyc++;
        @(posedge clk); #1;
      end
      check(phase == PH_CAPTURE && capture, "capture phase");
      sw_capture();
      n_capture++; cyc++;
      @(posedge clk); #1;
    end
    for (int k = 0; k < L; k++) begin
      check(phase == PH_UNLOAD && scan_en && busy, "unload phase");
      stream.push_back(chain[L-1]);
      for (int i = L - 1; i > 0; i--) chain[i] = chain[i-1];
      chain[0] = 1'b0;
      n_unload++; cyc++;
      @(posedge clk); #1;
    end
    check(done && !busy, "done");
    check(cyc == RUN_CYCLES, "start-to-done latency");
    if (done) n_done++;
    d = new[stream.size()];
    foreach (stream[i]) d[i] = stream[i];
    exp = poly_rem(d, N, 65'(POLY));
    check(signature == exp[N-1:0], "signature");
    $display("run %0d: %0d response bits, signature %h expected %h", run, d.size(), signature, exp[N-1:0]);
  endtask

  initial begin
    ref_st = 64'(SEED);
    foreach (chain[i]) chain[i] = 1'b0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    @(posedge clk); #1;
    check(!busy && !done, "idle after reset");
    run_once(0);
    repeat (5) @(posedge clk); #1;
    check(done, "done holds");
    run_once(1);
    check(n_shift > 0, "shift happened");
    check(n_capture > 0, "capture happened");
    check(n_unload > 0, "unload happened");
    check(n_gen_step > 0, "generator step happened");
    check(n_done == 2, "done reached twice");
    check(n_restart > 0, "restart happened");
    $display("shift %0d capture %0d unload %0d generator-groups %0d done %0d restart %0d",
             n_shift, n_capture, n_unload, n_gen_step, n_done, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
