// tb_lp_tpg: the serial output of the low-power TPG must be bit for bit the
// stream of a standard LFSR with the same polynomial and seed, under random
// enables. The counter must equal the bit index modulo Q, and the group y must
// hold the same Q stream bits for all Q clocks of its group, so the generator
// state changes only once per Q delivered bits. Runs the default (degree 33,
// Q = 5) and degree 28, 1 + x^3 + x^28, with Q = 10.
module tb_lp_tpg;
  import tb_ref_pkg::*;
  localparam int NA = bist_pkg::DEF_N, QA = bist_pkg::DEF_Q;
  localparam int NB = 28, QB = 10;
  localparam logic [28:0] PB = (29'd1 << 28) | (29'd1 << 3) | 29'd1;
  localparam logic [27:0] SB = 28'h0ABCDEF;
  localparam int CYCLES = 10000;

  logic clk = 0, rst = 1, en = 0;
  logic sa, sb, gsa, gsb;
  logic [QA-1:0] ya; logic [QB-1:0] yb;
  logic [2:0] ca; logic [3:0] cb;
  int checks = 0, failures = 0;
  bit str_a[CYCLES + 16], str_b[CYCLES + 16];

  lp_tpg dut_a (.clk, .rst, .en, .scan_bit(sa), .y(ya), .cnt(ca), .group_start(gsa));
  lp_tpg #(.N(NB), .Q(QB), .POLY(PB), .SEED(SB)) dut_b
    (.clk, .rst, .en, .scan_bit(sb), .y(yb), .cnt(cb), .group_start(gsb));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ra, rb; logic b;
    int bits, ga, gb, groups_a;
    ra = 64'(bist_pkg::DEF_SEED); rb = 64'(SB);
    foreach (str_a[i]) begin ra = lfsr_step(ra, NA, 65'(bist_pkg::DEF_POLY), b); str_a[i] = b; end
    foreach (str_b[i]) begin rb = lfsr_step(rb, NB, 65'(PB), b); str_b[i] = b; end
    bits = 0; groups_a = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int c = 0; c < CYCLES; c++) begin
      en = ($urandom_range(0, 4) != 0);
      #1;
      ga = bits - bits % QA;
      gb = bits - bits % QB;
      check(sa == str_a[bits], "A scan bit");
      check(sb == str_b[bits], "B scan bit");
      check(int'(ca) == bits % QA && gsa == (bits % QA == 0), "A counter");
      check(int'(cb) == bits % QB && gsb == (bits % QB == 0), "B counter");
      for (int k = 0; k < QA; k++) check(ya[k] == str_a[ga + k], "A group");
      for (int k = 0; k < QB; k++) check(yb[k] == str_b[gb + k], "B group");
      if (en && gsa) groups_a++;
      @(posedge clk); #1;
      if (en) bits++;
    end
    check(groups_a > 1000, "many generator steps");
    $display("bits %0d, groups of %0d %0d", bits, QA, groups_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
