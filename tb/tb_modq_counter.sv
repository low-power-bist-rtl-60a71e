// tb_modq_counter: checks the modulo-Q counter for Q = 5 and Q = 3 against a
// plain integer model under random enables, and that it wraps.
module tb_modq_counter;
  logic clk = 0, rst = 1, en = 0;
  logic [2:0] cnt5; logic last5;
  logic [1:0] cnt3; logic last3;
  int checks = 0, failures = 0, wraps5 = 0;
  int m5, m3;

  modq_counter #(.Q(5)) dut5 (.clk, .rst, .en, .cnt(cnt5), .last(last5));
  modq_counter #(.Q(3)) dut3 (.clk, .rst, .en, .cnt(cnt3), .last(last3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m5 = 0; m3 = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int c = 0; c < 2000; c++) begin
      en = ($urandom_range(0, 3) != 0);
      #1;
      check(cnt5 == 3'(m5) && last5 == (en && m5 == 4), "Q=5");
      check(cnt3 == 2'(m3) && last3 == (en && m3 == 2), "Q=3");
      if (last5) wraps5++;
      @(posedge clk); #1;
      if (en) begin m5 = (m5 + 1) % 5; m3 = (m3 + 1) % 3; end
    end
    check(wraps5 > 100, "wraps happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
