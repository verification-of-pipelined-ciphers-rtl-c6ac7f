// Self-checking testbench for kasumi_pipe.
// Runs the 8-, 16- and 32-stage configurations side by side on the same
// stream: the known-answer blocks of kasumi_comb_tb back to back, then random
// blocks and keys with random idle cycles. Every result is compared with the
// known answer or with the combinational reference kasumi_comb, and the
// latency of every block must be exactly STAGES cycles.
module kasumi_pipe_tb;
  logic clk = 1'b0;
  logic rst;
  logic         in_valid;
  logic [63:0]  din;
  logic [127:0] key;
  logic [63:0]  ref_out;
  int checks = 0, failures = 0;
  int cycle = 0;

  localparam int NCFG = 3;
  localparam int STG [NCFG] = '{8, 16, 32};

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

  // Expected results, tagged with the cycle the block entered.
  typedef struct { int t_in; logic [63:0] c; } exp_t;
  exp_t expq [NCFG][$];

  logic        ov [NCFG];
  logic [63:0] od [NCFG];

  kasumi_comb u_ref (.din(din), .key(key), .dout(ref_out));

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    kasumi_pipe #(.STAGES(STG[g])) dut (
      .clk(clk), .rst(rst), .in_valid(in_valid), .din(din), .key(key),
      .out_valid(ov[g]), .dout(od[g]));
  end

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      for (int g = 0; g < NCFG; g++) begin
        if (ov[g]) begin
          exp_t e;
          checks++;
          if (expq[g].size() == 0) begin
            failures++;
            $display("FAIL %0d-stage: unexpected output %h", STG[g], od[g]);
          end else begin
            e = expq[g].pop_front();
            if (od[g] !== e.c || cycle - e.t_in != STG[g]) begin
              failures++;
              $display("FAIL %0d-stage: got %h after %0d cycles, expected %h after %0d",
                       STG[g], od[g], cycle - e.t_in, e.c, STG[g]);
            end
          end
        end
      end
      if (in_valid)
        for (int g = 0; g < NCFG; g++) expq[g].push_back('{cycle, ref_out});
    end
  end

  task automatic drive(input logic v, input logic [127:0] k, input logic [63:0] p);
    in_valid <= v; key <= k; din <= p;
    @(posedge clk);
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; din = '0; key = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // Known answers back to back; the reference must agree with them too.
    foreach (VECS[i]) begin
      in_valid <= 1'b1; key <= VECS[i].k; din <= VECS[i].p;
      #1;
      checks++;
      if (ref_out !== VECS[i].c) begin
        failures++;
        $display("FAIL reference disagrees with known answer %0d", i);
      end
      @(posedge clk);
    end
    // Random traffic with idle cycles.
    for (int i = 0; i < 200; i++)
      drive(($urandom % 4) != 0, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom});
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
    for (int g = 0; g < NCFG; g++) begin
      checks++;
      if (expq[g].size() != 0) begin
        failures++;
        $display("FAIL %0d-stage: %0d blocks never came out", STG[g], expq[g].size());
      end
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
