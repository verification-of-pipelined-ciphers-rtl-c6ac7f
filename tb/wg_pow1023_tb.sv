// Self-checking testbench for wg_pow1023 (combinational u^(2^10-1)).
// Compares e with the reference results of an independent polynomial-basis
// model and, for random inputs, with ref_pow(u, 1023) computed by
// square-and-multiply (a different decomposition from the circuit's).
module wg_pow1023_tb;
  import wg_pkg::*;
  import wg_tb_pkg::*;
  logic clk = 1'b0;
  gf_t  u, e;
  int   checks = 0, failures = 0;

  wg_pow1023 dut (.clk(clk), .u(u), .e(e));

  always #5 clk = ~clk;

  task automatic check(input gf_t want);
    checks++;
    if (e !== want) begin
      failures++;
      $display("FAIL pow1023(%h) = %h, expected %h", u, e, want);
    end
  endtask

  initial begin
    for (int i = 0; i < NV; i++) begin
      u = VEC_X[i];
      @(posedge clk);
      check(POW_E[i]);
    end
    for (int i = 0; i < 60; i++) begin
      u = gf_t'($urandom);
      @(posedge clk);
      check(ref_pow(u, 29'd1023));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
