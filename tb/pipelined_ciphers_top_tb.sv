// End-to-end testbench for pipelined_ciphers_top at its default parameters
// (8-stage KASUMI pipeline).
//   KASUMI: the two full test vectors of the standard go through the
//   combinational and the pipelined cipher, followed by random blocks with
//   random keys and random idle cycles; every pipelined result must equal
//   the combinational result for the same input, exactly KASUMI_STAGES
//   cycles later.
//   WG: both generators are loaded with the key 80000000000000000000 /
//   IV 01234567 words; the first 64 bits of both keystreams must equal the
//   independent model's bits and each other.
// Each mechanism is counted and must occur at least once: pipeline bubbles
// (idle cycles between blocks), key changes from block to block, WG load,
// initialization and run phases (mode switches), LFSR stalls (ce = 0 in the
// optimized WG), second passes through the re-used multipliers of the
// optimized core, and a reset that restarts the WG generators.
module pipelined_ciphers_top_tb;
  import wg_tb_pkg::*;
  localparam int unsigned STAGES = 8;
  logic         clk = 1'b0, rst = 1'b1;
  logic [63:0]  kc_din = '0, kc_dout, kp_din = '0, kp_dout;
  logic [127:0] kc_key = '0, kp_key = '0;
  logic         kp_in_valid = 1'b0, kp_out_valid;
  logic [28:0]  wg_din = '0;
  logic         wg_ks, wg_ks_valid, wg_load, wgo_ks, wgo_ks_valid, wgo_load;
  int checks = 0, failures = 0, cycle = 0;
  int n_bubble = 0, n_keychg = 0, n_blocks = 0, n_load = 0, n_init = 0, n_run = 0;
  int n_stall = 0, n_reuse = 0, n_reset = 0, n_switch = 0;

  pipelined_ciphers_top dut (
    .clk(clk), .rst(rst),
    .kc_din(kc_din), .kc_key(kc_key), .kc_dout(kc_dout),
    .kp_in_valid(kp_in_valid), .kp_din(kp_din), .kp_key(kp_key),
    .kp_out_valid(kp_out_valid), .kp_dout(kp_dout),
    .wg_din(wg_din), .wg_ks(wg_ks), .wg_ks_valid(wg_ks_valid), .wg_load(wg_load),
    .wgo_ks(wgo_ks), .wgo_ks_valid(wgo_ks_valid), .wgo_load(wgo_load));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- KASUMI ----------------
  typedef struct { int due; logic [63:0] want; } exp_t;
  exp_t pend[$];
  localparam logic [127:0] K1 = 128'h2BD6459F82C5B300952C49104881FF48;
  localparam logic [63:0]  P1 = 64'hEA024714AD5C4D84, C1 = 64'hDF1F9B251C0BF45F;
  localparam logic [127:0] K2 = 128'h8CE33E2CC3C0B5FC1F3DE8A6DC66B1F3;
  localparam logic [63:0]  P2 = 64'hD3C5D592327FB11C, C2 = 64'hDE551988CEB2F9B7;

  always @(negedge clk) begin
    if (kp_out_valid) begin
      check($sformatf("KASUMI result at cycle %0d expected", cycle),
            pend.size() > 0 && pend[0].due == cycle);
      if (pend.size() > 0) begin
        check("KASUMI pipelined == combinational", kp_dout == pend[0].want);
        void'(pend.pop_front());
      end
    end else if (pend.size() > 0 && pend[0].due == cycle) begin
      check("KASUMI result missing", 1'b0);
      void'(pend.pop_front());
    end
  end

  task automatic kasumi_block(input logic [63:0] p, input logic [127:0] k);
    kc_din = p; kc_key = k;
    kp_din = p; kp_key = k; kp_in_valid = 1'b1;
    #1;
    pend.push_back('{cycle + STAGES, kc_dout});
    n_blocks++;
  endtask

  task automatic kasumi_run();
    logic [127:0] last_key;
    @(negedge clk);
    kasumi_block(P1, K1);
    check("KASUMI vector 1", kc_dout == C1);
    @(negedge clk);
    kasumi_block(P2, K2);
    check("KASUMI vector 2", kc_dout == C2);
    n_keychg++;
    last_key = K2;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        kp_in_valid = 1'b0;
        n_bubble++;
      end else begin
        logic [127:0] k;
        k = ($urandom_range(0, 1) == 0) ? last_key
                                        : {$urandom, $urandom, $urandom, $urandom};
        if (k != last_key) n_keychg++;
        last_key = k;
        kasumi_block({$urandom, $urandom}, k);
      end
    end
    @(negedge clk);
    kp_in_valid = 1'b0;
    repeat (STAGES + 2) @(negedge clk);
    check("all KASUMI results arrived", pend.size() == 0);
  endtask

  // ---------------- WG ----------------
  bit  ks_r[$], ks_o[$];
  logic [1:0] prev_state = 2'b01;
  always @(negedge clk) begin
    if (!rst) begin
      if (wg_ks_valid) ks_r.push_back(wg_ks);
      if (wgo_ks_valid) ks_o.push_back(wgo_ks);
      if (wgo_load) n_load++;
      if (dut.u_wg_opt.state == 2'b10) n_init++;
      if (dut.u_wg_opt.state == 2'b00) n_run++;
      if (dut.u_wg_opt.state != prev_state) n_switch++;
      prev_state = dut.u_wg_opt.state;
      if (dut.u_wg_opt.state != 2'b01 && !dut.u_wg_opt.ce) n_stall++;
      if (dut.u_wg_opt.u_core.v[10]) n_reuse++;
    end
  end

  task automatic wg_run(input int nbits);
    int idx;
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    n_reset++;
    ks_r.delete(); ks_o.delete();
    prev_state = 2'b01;
    idx = 0;
    while (ks_o.size() < nbits && idx < 5000) begin
      #1;
      wg_din = (wg_load && idx < 11) ? WG_LOAD[idx] : 29'($urandom);
      check("both WG generators load together", wg_load == wgo_load);
      @(negedge clk);
      idx++;
    end
    check("optimized WG produced its bits", ks_o.size() >= nbits);
    for (int i = 0; i < nbits && i < ks_o.size(); i++) begin
      check($sformatf("WG bit %0d: both designs agree", i), i < ks_r.size() && ks_o[i] == ks_r[i]);
      check($sformatf("WG bit %0d: model", i), ks_o[i] == WG_KS[127 - i]);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    kasumi_run();
    wg_run(64);
    wg_run(16);
    check($sformatf("KASUMI blocks seen (%0d)", n_blocks), n_blocks > 0);
    check($sformatf("pipeline bubbles seen (%0d)", n_bubble), n_bubble > 0);
    check($sformatf("key changes seen (%0d)", n_keychg), n_keychg > 0);
    check($sformatf("WG load cycles seen (%0d)", n_load), n_load > 0);
    check($sformatf("WG init cycles seen (%0d)", n_init), n_init > 0);
    check($sformatf("WG run cycles seen (%0d)", n_run), n_run > 0);
    check($sformatf("WG mode switches seen (%0d)", n_switch), n_switch >= 4);
    check($sformatf("LFSR stalls seen (%0d)", n_stall), n_stall > 0);
    check($sformatf("multiplier re-use passes seen (%0d)", n_reuse), n_reuse > 0);
    check($sformatf("WG restarts seen (%0d)", n_reset), n_reset >= 2);
    $display("mechanisms: blocks=%0d bubbles=%0d key_changes=%0d load=%0d init=%0d run=%0d switches=%0d stalls=%0d reuse=%0d resets=%0d",
             n_blocks, n_bubble, n_keychg, n_load, n_init, n_run, n_switch, n_stall, n_reuse, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
