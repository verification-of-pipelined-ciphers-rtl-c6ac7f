// Self-checking testbench for kasumi_fi.
// Applies the FI vectors of the KASUMI standard's test set (round 1 and 2 of
// the first full-cipher vector) and compares dout with the published results.
module kasumi_fi_tb;
  logic clk = 1'b0;
  logic [15:0] din, ki, dout;
  int checks = 0, failures = 0;

  kasumi_fi dut (.din(din), .ki(ki), .dout(dout));

  always #5 clk = ~clk;

  typedef struct packed { logic [15:0] x, k, y; } vec_t;
  localparam vec_t VECS [6] = '{
    '{16'hCF17, 16'h6BF0, 16'h43CD}, '{16'hD35D, 16'h7EEF, 16'hD85E},
    '{16'hA9C9, 16'hCD58, 16'h4FB0}, '{16'hAD6B, 16'hF388, 16'hE2FC},
    '{16'hDBFB, 16'h6BF0, 16'hBBA8}, '{16'hA7A6, 16'h2AF5, 16'h165E}
  };

  initial begin
    for (int i = 0; i < 6; i++) begin
      din = VECS[i].x; ki = VECS[i].k;
      @(posedge clk);
      checks++;
      if (dout !== VECS[i].y) begin
        failures++;
        $display("FAIL FI(%h,%h) = %h, expected %h", VECS[i].x, VECS[i].k, dout, VECS[i].y);
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
