// Self-checking testbench for kasumi_fo.
// Applies FO vectors of the KASUMI standard's first test set (rounds 1-4,
// with the round subkeys of that key) and compares dout with the published
// results.
module kasumi_fo_tb;
  logic clk = 1'b0;
  logic [31:0] din, dout;
  logic [47:0] ko, ki;
  int checks = 0, failures = 0;

  kasumi_fo dut (.din(din), .ko(ko), .ki(ki), .dout(dout));

  always #5 clk = ~clk;

  typedef struct packed { logic [31:0] x; logic [47:0] ko, ki; logic [31:0] y; } vec_t;
  localparam vec_t VECS [4] = '{
    '{32'h7CFFC314, 48'hB3E810492910, 48'h6BF07EEFCD58, 32'h58871737},
    '{32'hF5DB5AB3, 48'h58B081481FE9, 48'hF3886BF02AF5, 32'h03E715B9},
    '{32'hE9F55CF7, 48'h601648FFC57A, 48'h3ED5F38800F8, 32'hF9C9DB3F},
    '{32'h0C12818C, 48'hA592D62BE8B3, 48'hCD583ED50B6E, 32'hF9C83A1A}
  };

  initial begin
    foreach (VECS[i]) begin
      din = VECS[i].x; ko = VECS[i].ko; ki = VECS[i].ki;
      @(posedge clk);
      checks++;
      if (dout !== VECS[i].y) begin
        failures++;
        $display("FAIL FO(%h) = %h, expected %h", VECS[i].x, dout, VECS[i].y);
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
