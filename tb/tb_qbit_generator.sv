// tb_qbit_generator: runs the q-bit generator at its defaults with random step
// enables. Every group y must equal the next Q bits of a standard LFSR with the
// same seed, and the state may change only on a step. Also checks that the
// degree-5 generator (1 + x^2 + x^5, Q = 3) returns to its seed after 31 steps,
// i.e. 93 bits, the period 31 times 3.
module tb_qbit_generator;
  import tb_ref_pkg::*;
  localparam int N = bist_pkg::DEF_N, Q = bist_pkg::DEF_Q;
  logic clk = 0, rst = 1, step = 0, step5 = 0;
  logic [N-1:0] state; logic [Q-1:0] y;
  logic [4:0] state5; logic [2:0] y5;
  int checks = 0, failures = 0;

  qbit_generator dut (.clk, .rst, .step, .state, .y);
  qbit_generator #(.N(5), .Q(3), .POLY(6'b100101), .SEED(5'h01)) dut5
    (.clk, .rst, .step(step5), .state(state5), .y(y5));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ref_st; logic b; logic [Q-1:0] exp; logic [N-1:0] prev;
    int steps = 0;
    ref_st = 64'(bist_pkg::DEF_SEED);
    @(posedge clk); @(posedge clk); #1 rst = 0;
    checks++;
    if (state !== N'(bist_pkg::DEF_SEED)) begin failures++; $display("FAIL seed"); end
    for (int c = 0; c < 3000; c++) begin
      logic [63:0] tmp;
      step = $urandom_range(0, 1);
      tmp = ref_st; exp = '0;
      for (int k = 0; k < Q; k++) begin tmp = lfsr_step(tmp, N, 65'(bist_pkg::DEF_POLY), b); exp[k] = b; end
      #1;
      checks++;
      if (y !== exp) begin failures++; $display("FAIL y=%b exp=%b cycle %0d", y, exp, c); end
      prev = state;
      @(posedge clk); #1;
      if (step) begin ref_st = tmp; steps++; end
      checks++;
      if (!step && state !== prev) begin failures++; $display("FAIL state moved without step"); end
    end
    checks++;
    if (steps < 1000) begin failures++; $display("FAIL too few steps"); end
    // period of the degree-5 generator
    step5 = 1;
    for (int s = 1; s <= 31; s++) begin
      @(posedge clk); #1;
      checks++;
      if ((state5 == 5'h01) != (s == 31)) begin failures++; $display("FAIL period at step %0d", s); end
    end
    step5 = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
