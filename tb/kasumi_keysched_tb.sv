// Self-checking testbench for kasumi_keysched.
// Checks all 24 round subkey groups (KL, KO, KI of rounds 1-8) of the
// KASUMI standard's first test key against the published values.
module kasumi_keysched_tb;
  import kasumi_pkg::*;
  logic clk = 1'b0;
  logic [127:0] key;
  round_key_t   rk [8];
  int checks = 0, failures = 0;

  kasumi_keysched dut (.key(key), .rk(rk));

  always #5 clk = ~clk;

  localparam logic [127:0] EXP [8] = '{
    128'h57AC0B6E_B3E810492910_6BF07EEFCD58,
    128'h8B3E7EEF_58B081481FE9_F3886BF02AF5,
    128'h058B6BF0_601648FFC57A_3ED5F38800F8,
    128'h6601F388_A592D62BE8B3_CD583ED50B6E,
    128'h2A593ED5_22099F45B058_2AF5CD587EEF,
    128'h9220CD58_1029C5821660_00F82AF56BF0,
    128'h91022AF5_E91F00B392A5_0B6E00F8F388,
    128'hFE9100F8_7AC52C950922_7EEF0B6E3ED5
  };

  initial begin
    key = 128'h2BD6459F82C5B300952C49104881FF48;
    @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (rk[i] !== EXP[i]) begin
        failures++;
        $display("FAIL round %0d subkeys %h, expected %h", i + 1, rk[i], EXP[i]);
      end
    end
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
