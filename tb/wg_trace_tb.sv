// Self-checking testbench for wg_trace: the trace in the normal basis is the
// parity of the 29 coordinates. Checks the all-zero and all-one elements
// (trace of 1 is 29 mod 2 = 1) and random elements against $countones.
module wg_trace_tb;
  import wg_pkg::*;
  logic clk = 1'b0;
  gf_t  x;
  logic y;
  int   checks = 0, failures = 0;

  wg_trace dut (.x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 202; i++) begin
      x = (i == 0) ? '0 : (i == 1) ? '1 : gf_t'($urandom);
      @(posedge clk);
      checks++;
      if (y !== 1'($countones(x) % 2)) begin
        failures++;
        $display("FAIL trace(%h) = %b", x, y);
      end
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
