// Self-checking testbench for kasumi_comb.
// Encrypts the two full-cipher vectors of the KASUMI standard's test data and
// six further blocks whose ciphertexts were computed with an independent
// software model of KASUMI, and compares the results.
module kasumi_comb_tb;
  logic clk = 1'b0;
  logic [63:0]  din, dout;
  logic [127:0] key;
  int checks = 0, failures = 0;

  kasumi_comb dut (.din(din), .key(key), .dout(dout));

  always #5 clk = ~clk;

  typedef struct packed { logic [127:0] k; logic [63:0] p, c; } vec_t;
  localparam vec_t VECS [8] = '{
    '{128'h2BD6459F82C5B300952C49104881FF48, 64'hEA024714AD5C4D84, 64'hDF1F9B251C0BF45F},
    '{128'h8CE33E2CC3C0B5FC1F3DE8A6DC66B1F3, 64'hD3C5D592327FB11C, 64'hDE551988CEB2F9B7},
    '{128'h6513270E269E0D37F2A74DE452E6B438, 64'h0C5C7FD0A6A3A450, 64'h20973A9101CCA81A},
    '{128'h1818E811892F902BD23F0824128B2F33, 64'h9531985D5D9DC9F8, 64'hE4ACA8F1665AFBE5},
    '{128'h36F675CC81E74EF5E8E25D940ED90475, 64'h1600A35A099950D8, 64'hB1C37260EDB0864D},
    '{128'h3D9C172411E20B8F6B0D549B6F03675A, 64'h8D116ECE1738F7D9, 64'h0A48F448DE5BF2D0},
    '{128'h90C192CFD3AC94AF0F21DDB66CAD4A26, 64'hF28C105D1FB17C23, 64'h733E1594EC39C7FE},
    '{128'h953F48F1A09F76B5A170B33839263059, 64'h0FD630F1F29D0DA9, 64'h5D003E98DCEB338D}
  };

  initial begin
    foreach (VECS[i]) begin
      din = VECS[i].p; key = VECS[i].k;
      @(posedge clk);
      checks++;
      if (dout !== VECS[i].c) begin
        failures++;
        $display("FAIL KASUMI(%h) = %h, expected %h", VECS[i].p, dout, VECS[i].c);
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
