// Self-checking testbench for wg_fsm_opt. A model of the eleven-stage core
// returns d_ready 11 cycles after each d_valid. Checked every cycle:
//   REG_LOAD : 11 cycles, ce = 1, d_valid = 0, load = 1, init = 0;
//   INIT     : first cycle d_valid = 1 and ce = 0; later d_valid equals the
//              previous cycle's d_ready and ce = d_ready; lasts exactly
//              528 cycles (44 packets of 12 cycles);
//   RUN      : first cycle d_valid = 1, ce = 0; then d_valid toggles every
//              cycle and ce equals the previous cycle's d_valid.
module wg_fsm_opt_tb;
  logic clk = 1'b0, rst = 1'b1, d_ready, init, load, ce, d_valid;
  logic [1:0]  state;
  logic [10:0] pipe = '0;
  int   checks = 0, failures = 0;

  wg_fsm_opt dut (.clk(clk), .rst(rst), .d_ready(d_ready), .init(init), .load(load),
                  .ce(ce), .d_valid(d_valid), .state(state));

  always #5 clk = ~clk;
  always @(posedge clk) pipe <= rst ? '0 : {pipe[9:0], d_valid};
  assign d_ready = pipe[10];

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input int ncyc);
    logic prev_ready, prev_valid;
    prev_ready = 1'b0; prev_valid = 1'b0;
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    for (int c = 0; c < ncyc; c++) begin
      if (c < 11) begin
        check($sformatf("load cycle %0d", c), {init, load} == 2'b01 && ce && !d_valid);
      end else if (c < 11 + 528) begin
        check($sformatf("init state at cycle %0d", c), {init, load} == 2'b10);
        if (c == 11) check("init first cycle", d_valid && !ce);
        else check($sformatf("init valid/ce at cycle %0d", c),
                   d_valid == prev_ready && ce == d_ready);
      end else begin
        check($sformatf("run state at cycle %0d", c), {init, load} == 2'b00);
        if (c == 11 + 528) check("run first cycle", d_valid && !ce);
        else check($sformatf("run valid/ce at cycle %0d", c),
                   d_valid == !prev_valid && ce == prev_valid);
      end
      prev_ready = d_ready;
      prev_valid = d_valid;
      @(negedge clk);
    end
  endtask

  initial begin
    run(700);
    run(100);
    run(600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
