// Self-checking testbench for kasumi_fl.
// Applies FL vectors of the KASUMI standard's first test set (rounds 1-4) and
// compares dout with the published results.
module kasumi_fl_tb;
  logic clk = 1'b0;
  logic [31:0] din, kl, dout;
  int checks = 0, failures = 0;

  kasumi_fl dut (.din(din), .kl(kl), .dout(dout));

  always #5 clk = ~clk;

  typedef struct packed { logic [31:0] x, k, y; } vec_t;
  localparam vec_t VECS [4] = '{
    '{32'hEA024714, 32'h57AC0B6E, 32'h7CFFC314},
    '{32'h03E715B9, 32'h8B3E7EEF, 32'hFC1913F5},
    '{32'h161B54E1, 32'h058B6BF0, 32'hE9F55CF7},
    '{32'hF9C83A1A, 32'h6601F388, 32'h0EFDFA1A}
  };

  initial begin
    foreach (VECS[i]) begin
      din = VECS[i].x; kl = VECS[i].k;
      @(posedge clk);
      checks++;
      if (dout !== VECS[i].y) begin
        failures++;
        $display("FAIL FL(%h,%h) = %h, expected %h", VECS[i].x, VECS[i].k, dout, VECS[i].y);
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
