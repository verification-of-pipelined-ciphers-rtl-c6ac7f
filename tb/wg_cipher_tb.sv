// Self-checking testbench for wg_cipher (non-pipelined WG).
// Loads the 11 words for key 80000000000000000000 / IV 01234567 while load
// is high, then checks the phase lengths (11 load cycles, 44 initialization
// cycles, then ks_valid every cycle) and compares 128 keystream bits with the
// independent model's sequence. A second run after a reset mid-keystream must
// give the same bits again.
module wg_cipher_tb;
  import wg_pkg::*;
  import wg_tb_pkg::*;
  logic clk = 1'b0, rst = 1'b1, ks, ks_valid, load;
  gf_t  din = '0;
  int   checks = 0, failures = 0;

  wg_cipher dut (.clk(clk), .rst(rst), .din(din), .ks(ks), .ks_valid(ks_valid), .load(load));

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input int nbits);
    int nload, ninit, nks;
    nload = 0; ninit = 0; nks = 0;
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    while (nks < nbits && nload + ninit + nks < 400) begin
      #1;
      if (load) begin
        din = WG_LOAD[nload % 11];
        nload++;
      end else if (!ks_valid) begin
        ninit++;
        din = gf_t'($urandom);
      end else begin
        check($sformatf("keystream bit %0d", nks), ks == WG_KS[127 - nks]);
        check("no gaps in keystream", ninit == 44);
        nks++;
      end
      @(negedge clk);
    end
    check($sformatf("load cycles %0d == 11", nload), nload == 11);
    check($sformatf("init cycles %0d == 44", ninit), ninit == 44);
    check("keystream produced", nks == nbits);
  endtask

  initial begin
    run(128);
    run(20);
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
