// tb_signature_analyzer: feeds random streams of random length into the
// signature analyzer (default degree-33 polynomial) with random idle cycles and
// compares the signature with the remainder from schoolbook long division.
// Also checks that clear empties the register.
module tb_signature_analyzer;
  import tb_ref_pkg::*;
  localparam int N = bist_pkg::DEF_N;
  logic clk = 0, rst = 1, clear = 0, en = 0, din = 0;
  logic [N-1:0] sig;
  int checks = 0, failures = 0;

  signature_analyzer dut (.clk, .rst, .clear, .en, .din, .sig);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit d[];
    logic [63:0] exp;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 40; t++) begin
      int len;
      len = $urandom_range(1, 300);
      d = new[len];
      foreach (d[k]) d[k] = 1'($urandom);
      clear = 1; @(posedge clk); #1 clear = 0;
      checks++;
      if (sig !== '0) begin failures++; $display("FAIL clear"); end
      foreach (d[k]) begin
        while ($urandom_range(0, 3) == 0) begin en = 0; @(posedge clk); #1; end
        en = 1; din = d[k];
        @(posedge clk); #1;
      end
      en = 0;
      exp = poly_rem(d, N, 65'(bist_pkg::DEF_POLY));
      checks++;
      if (sig !== exp[N-1:0]) begin failures++; $display("FAIL len %0d sig %h exp %h", len, sig, exp[N-1:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
