// Self-checking testbench for wg_cipher_opt (pipelined WG with re-use).
// Runs the optimized cipher and the non-pipelined wg_cipher side by side with
// the same load words: first the words for key 80000000000000000000 / IV
// 01234567, then random words. Checks
//   * 11 load cycles, then exactly 528 cycles (44 x 12) until RUN, and the
//     first keystream bit 12 cycles after RUN starts (first valid bit at
//     cycle 11 + 528 + 12 after reset);
//   * one keystream bit every two cycles (rate check);
//   * the keystream equals that of wg_cipher bit for bit and, for the first
//     load, the independent model's 128 bits.
module wg_cipher_opt_tb;
  import wg_pkg::*;
  import wg_tb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic ks_o, ksv_o, load_o, ks_r, ksv_r, load_r;
  gf_t  din = '0;
  int   checks = 0, failures = 0;
  bit   ref_bits[$];

  wg_cipher_opt dut (.clk(clk), .rst(rst), .din(din), .ks(ks_o), .ks_valid(ksv_o), .load(load_o));
  wg_cipher     ref_wg (.clk(clk), .rst(rst), .din(din), .ks(ks_r), .ks_valid(ksv_r), .load(load_r));

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // collect the reference keystream
  always @(negedge clk) if (!rst && ksv_r) ref_bits.push_back(ks_r);

  task automatic run(input bit known, input int nbits);
    gf_t words [11];
    int  cyc, nload, nks, first, last;
    for (int i = 0; i < 11; i++) words[i] = known ? WG_LOAD[i] : gf_t'($urandom);
    cyc = 0; nload = 0; nks = 0; first = -1; last = -1;
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    ref_bits.delete();
    while (nks < nbits && cyc < 2000) begin
      #1;
      check("both generators load together", load_o == load_r);
      if (load_o) begin
        din = words[nload];
        nload++;
      end else din = gf_t'($urandom);
      if (cyc == 11 + 528) check("RUN entered after 528 init cycles", dut.state == 2'b00);
      if (cyc == 11 + 527) check("still INIT at cycle 527", dut.state == 2'b10);
      if (ksv_o) begin
        if (first < 0) begin
          first = cyc;
          check($sformatf("first keystream bit at cycle %0d (expected %0d)", cyc, 11 + 528 + 12),
                cyc == 11 + 528 + 12);
        end else begin
          check($sformatf("rate: bit at cycle %0d, previous %0d", cyc, last), cyc - last == 2);
        end
        last = cyc;
        check($sformatf("bit %0d equals non-pipelined WG", nks),
              nks < ref_bits.size() && ks_o == ref_bits[nks]);
        if (known) check($sformatf("bit %0d equals model", nks), ks_o == WG_KS[127 - nks]);
        nks++;
      end
      @(negedge clk);
      cyc++;
    end
    check("load cycles == 11", nload == 11);
    check("keystream produced", nks == nbits);
  endtask

  initial begin
    run(1'b1, 128);
    run(1'b0, 100);
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
