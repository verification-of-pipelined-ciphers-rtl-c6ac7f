// Self-checking testbench for wg_pow1023_reuse (nine-stage, re-used
// multipliers). Packets u enter with d_valid an even number of cycles apart,
// as the WG controller sends them: first back to back at the maximum rate
// (one per two cycles), then with random even gaps. Each e must equal the reference u^(2^10-1) exactly 9 cycles after its
// packet entered (latency check). The expected values come from the
// independent model's vectors and, for random u, from ref_pow (square and
// multiply). A reset in the middle must drop the packets
// in flight without disturbing later ones.
module wg_pow1023_reuse_tb;
  import wg_pkg::*;
  import wg_tb_pkg::*;
  logic clk = 1'b0, rst = 1'b1, d_valid = 1'b0;
  gf_t  u = '0, e;
  int   checks = 0, failures = 0, cycle = 0;
  int   sent = 0;

  typedef struct { int due; gf_t want; } exp_t;
  exp_t pend[$];

  wg_pow1023_reuse dut (.clk(clk), .rst(rst), .d_valid(d_valid), .u(u), .e(e));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // compare every due packet
  always @(negedge clk) begin
    while (pend.size() > 0 && pend[0].due == cycle) begin
      checks++;
      if (e !== pend[0].want) begin
        failures++;
        $display("FAIL cycle %0d: e = %h expected %h", cycle, e, pend[0].want);
      end
      void'(pend.pop_front());
    end
  end

  task automatic send(input gf_t val, input gf_t want);
    @(negedge clk);
    u = val; d_valid = 1'b1;
    pend.push_back('{cycle + 9, want});
    sent++;
    @(negedge clk);
    d_valid = 1'b0;
    u = gf_t'($urandom);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < NV; i++) send(VEC_X[i], POW_E[i]);
    for (int i = 0; i < 200; i++) begin
      gf_t r;
      r = (i < 20) ? gf_t'($urandom) : VEC_X[i % NV];
      send(r, (i < 20) ? ref_pow(r, 29'd1023) : POW_E[i % NV]);
      if (i % 3 == 0) repeat (2 * $urandom_range(0, 3)) @(negedge clk);
    end
    repeat (12) @(negedge clk);
    // reset with packets in flight: they are dropped, later ones still work
    send(VEC_X[2], POW_E[2]);
    void'(pend.pop_back());
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    send(VEC_X[5], POW_E[5]);
    repeat (12) @(negedge clk);
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
