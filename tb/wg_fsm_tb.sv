// Self-checking testbench for wg_fsm. After reset the outputs {init, load}
// must be 01 for exactly 11 cycles, 10 for exactly 44 cycles and then 00 for
// good. A reset in the middle of each phase must restart the sequence.
module wg_fsm_tb;
  logic clk = 1'b0, rst = 1'b1, init, load;
  logic [1:0] state;
  int   checks = 0, failures = 0;

  wg_fsm dut (.clk(clk), .rst(rst), .init(init), .load(load), .state(state));

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // reset, then follow the sequence for ncyc cycles
  task automatic run(input int ncyc);
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    for (int c = 0; c < ncyc; c++) begin
      logic [1:0] want;
      want = (c < 11) ? 2'b01 : (c < 55) ? 2'b10 : 2'b00;
      check($sformatf("cycle %0d: {init,load} = %b, expected %b", c, {init, load}, want),
            {init, load} == want && state == want);
      @(negedge clk);
    end
  endtask

  initial begin
    run(100);
    run(5);
    run(30);
    run(70);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
