// Self-checking testbench for wg_core_reuse (eleven-stage WG core with
// re-used multipliers). Packets x enter with d_valid an even number of cycles
// apart, first at the maximum rate and then with random even gaps. d_ready must
// rise exactly 11 cycles after each d_valid (latency check) and never
// otherwise, and y in that cycle must equal the WG permutation of x: the
// independent model's vectors, and for random x the combinational wg_core.
module wg_core_reuse_tb;
  import wg_pkg::*;
  import wg_tb_pkg::*;
  logic clk = 1'b0, rst = 1'b1, d_valid = 1'b0, d_ready;
  gf_t  x = '0, y, y_ref;
  int   checks = 0, failures = 0, cycle = 0;

  typedef struct { int due; gf_t want; } exp_t;
  exp_t pend[$];

  wg_core_reuse dut (.clk(clk), .rst(rst), .d_valid(d_valid), .x(x), .y(y),
                     .d_ready(d_ready));
  wg_core       ref_core_i (.clk(clk), .x(x), .y(y_ref));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) begin
    if (pend.size() > 0 && pend[0].due == cycle) begin
      checks += 2;
      if (!d_ready) begin
        failures++;
        $display("FAIL cycle %0d: d_ready low when a result was due", cycle);
      end
      if (y !== pend[0].want) begin
        failures++;
        $display("FAIL cycle %0d: y = %h expected %h", cycle, y, pend[0].want);
      end
      void'(pend.pop_front());
    end else if (d_ready) begin
      checks++;
      failures++;
      $display("FAIL cycle %0d: unexpected d_ready", cycle);
    end
  end

  task automatic send(input gf_t val);
    @(negedge clk);
    x = val; d_valid = 1'b1;
    #1 pend.push_back('{cycle + 11, y_ref});
    @(negedge clk);
    d_valid = 1'b0;
    x = gf_t'($urandom);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < NV; i++) begin
      send(VEC_X[i]);
      checks++;
      if (pend[pend.size()-1].want !== CORE_Y[i]) begin
        failures++;
        $display("FAIL reference core disagrees on vector %0d", i);
      end
    end
    for (int i = 0; i < 200; i++) begin
      send(gf_t'($urandom));
      if (i % 4 == 0) repeat (2 * $urandom_range(0, 3)) @(negedge clk);
    end
    repeat (14) @(negedge clk);
    checks++;
    if (pend.size() != 0) begin
      failures++;
      $display("FAIL %0d results never arrived", pend.size());
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
