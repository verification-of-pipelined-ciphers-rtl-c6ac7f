// Self-checking testbench for wg_nb_mul.
// Checks that the written-out pair table of wg_pkg equals the multiplication
// matrix derived from g(x) and gamma, then drives a combinational and a
// two-stage pipelined multiplier with the reference products of an
// independent polynomial-basis model and with random operands compared
// against the slow reference ref_mul. The pipelined product must appear
// exactly one cycle after its operands (latency check); new operands are
// applied every cycle.
module wg_nb_mul_tb;
  import wg_pkg::*;
  import wg_tb_pkg::*;
  logic clk = 1'b0;
  gf_t  a, b, p_comb, p_pipe;
  gf_t  exp_prev;
  int   checks = 0, failures = 0;

  wg_nb_mul #(.PIPELINED(1'b0)) dut_c (.clk(clk), .a(a), .b(b), .p(p_comb));
  wg_nb_mul #(.PIPELINED(1'b1)) dut_p (.clk(clk), .a(a), .b(b), .p(p_pipe));

  always #5 clk = ~clk;

  task automatic check(input string what, input gf_t got, input gf_t want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  initial begin
    int ones;
    ones = 0;
    for (int i = 0; i < M; i++) ones += $countones(REF_LAMBDA[i]);
    checks++;
    if (ones != NPAIRS) begin
      failures++;
      $display("FAIL matrix has %0d ones, table %0d", ones, NPAIRS);
    end
    for (int n = 0; n < NPAIRS; n++) begin
      checks++;
      if (!REF_LAMBDA[pair_i(n)][PAIR_J[n]]) begin
        failures++;
        $display("FAIL pair %0d not in matrix", n);
      end
    end
    // reference vectors, one per cycle
    for (int i = 0; i < NV; i++) begin
      a = MUL_A[i]; b = MUL_B[i];
      #1 check("comb vector", p_comb, MUL_P[i]);
      @(posedge clk); #1;
      check("pipe vector (1 cycle)", p_pipe, MUL_P[i]);
    end
    // random operands, back to back
    exp_prev = ref_mul(a, b);
    for (int i = 0; i < 300; i++) begin
      gf_t want;
      a = gf_t'($urandom); b = gf_t'($urandom);
      if (i % 50 == 0) a = '1;
      want = ref_mul(a, b);
      #1 check("comb random", p_comb, want);
      check("pipe holds previous", p_pipe, exp_prev);
      @(posedge clk); #1;
      check("pipe random", p_pipe, want);
      exp_prev = want;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
