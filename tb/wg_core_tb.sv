// Self-checking testbench for wg_core (combinational WG permutation).
// Compares y with the reference results of an independent polynomial-basis
// model and, for random inputs, with ref_core, which evaluates t(x+1)+1 from
// its five exponents by square-and-multiply.
module wg_core_tb;
  import wg_pkg::*;
  import wg_tb_pkg::*;
  logic clk = 1'b0;
  gf_t  x, y;
  int   checks = 0, failures = 0;

  wg_core dut (.clk(clk), .x(x), .y(y));

  always #5 clk = ~clk;

  task automatic check(input gf_t want);
    checks++;
    if (y !== want) begin
      failures++;
      $display("FAIL core(%h) = %h, expected %h", x, y, want);
    end
  endtask

  initial begin
    for (int i = 0; i < NV; i++) begin
      x = VEC_X[i];
      @(posedge clk);
      check(CORE_Y[i]);
    end
    for (int i = 0; i < 40; i++) begin
      x = gf_t'($urandom);
      @(posedge clk);
      check(ref_core(x));
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
