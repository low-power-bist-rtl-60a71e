// tb_vq_matrix: checks the V^Q matrix against Q steps of a standard LFSR for
// random states: the default degree-33 configuration with Q = 5, and degree 5
// with Q = 10 (more new bits than state bits).
module tb_vq_matrix;
  import tb_ref_pkg::*;
  localparam int N1 = 33, Q1 = 5;
  localparam logic [33:0] P1 = bist_pkg::DEF_POLY;
  localparam int N2 = 5, Q2 = 10;
  localparam logic [5:0] P2 = 6'b100101;   // 1 + x^2 + x^5

  logic [N1-1:0] s1, ns1; logic [Q1-1:0] nb1;
  logic [N2-1:0] s2, ns2; logic [Q2-1:0] nb2;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  vq_matrix #(.N(N1), .Q(Q1), .POLY(P1)) dut1 (.state(s1), .new_bits(nb1), .next_state(ns1));
  vq_matrix #(.N(N2), .Q(Q2), .POLY(P2)) dut2 (.state(s2), .new_bits(nb2), .next_state(ns2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] st; logic b; logic [Q2-1:0] exp;
    for (int t = 0; t < 500; t++) begin
      s1 = {$urandom, $urandom};
      s2 = 5'($urandom);
      #1;
      st = 64'(s1); exp = '0;
      for (int k = 0; k < Q1; k++) begin st = lfsr_step(st, N1, 65'(P1), b); exp[k] = b; end
      checks++;
      if (nb1 !== exp[Q1-1:0] || ns1 !== st[N1-1:0]) begin
        failures++; $display("FAIL N=33 state=%h bits=%b exp=%b", s1, nb1, exp[Q1-1:0]);
      end
      st = 64'(s2); exp = '0;
      for (int k = 0; k < Q2; k++) begin st = lfsr_step(st, N2, 65'(P2), b); exp[k] = b; end
      checks++;
      if (nb2 !== exp || ns2 !== st[N2-1:0]) begin
        failures++; $display("FAIL N=5 state=%h bits=%b exp=%b", s2, nb2, exp);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
