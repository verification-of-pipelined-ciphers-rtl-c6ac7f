// Normal-basis multiplier in GF(2^29), combinational or two-stage pipelined.
//
// Computes p = a * b with the multiplication matrix of the optimal normal
// basis (see wg_pkg): product bit k is the XOR, over the NPAIRS ones (i, j)
// of LAMBDA, of a[(i+k) mod 29] & b[(j+k) mod 29]. The AND terms are built
// with generate loops. With PIPELINED = 0 the multiplier is purely
// combinational. With PIPELINED = 1 it is split into two stages, as the
// optimized WG design requires of all its multipliers: the first stage XORs
// the terms in GROUPS groups and registers these partial sums; the second
// stage XORs the groups. This split is this design's own; the thesis only asks
// for two balanced stages and uses an optimal normal basis multiplier from the
// literature whose insides it does not give. The internal register has no
// enable and no reset: it samples every cycle, and the circuits around it rely
// on that.
//
// Ports: clk, a, b -> p (29 bits each). Latency 0 (PIPELINED = 0) or 1 cycle.
module wg_nb_mul
  import wg_pkg::*;
#(
  parameter bit          PIPELINED = 1'b0,
  parameter int unsigned GROUPS    = 8
) (
  input  logic clk,
  input  gf_t  a,
  input  gf_t  b,
  output gf_t  p
);
  localparam int unsigned PER_GROUP = (NPAIRS + GROUPS - 1) / GROUPS;
  localparam int unsigned PADDED    = PER_GROUP * GROUPS;

  // terms[k][n]: AND term of pair n for product bit k (zero padding at the end)
  logic [PADDED-1:0] terms [M];

  for (genvar k = 0; k < M; k++) begin : g_bit
    for (genvar n = 0; n < PADDED; n++) begin : g_term
      if (n < NPAIRS) begin : g_and
        assign terms[k][n] = a[(pair_i(n) + k) % M] & b[(PAIR_J[n] + k) % M];
      end else begin : g_pad
        assign terms[k][n] = 1'b0;
      end
    end
  end

  if (PIPELINED) begin : g_pipe
    logic [GROUPS-1:0] part   [M];
    logic [GROUPS-1:0] part_q [M];
    for (genvar k = 0; k < M; k++) begin : g_bit
      for (genvar g = 0; g < GROUPS; g++) begin : g_grp
        assign part[k][g] = ^terms[k][g*PER_GROUP +: PER_GROUP];
      end
      assign p[k] = ^part_q[k];
    end
    always_ff @(posedge clk) part_q <= part;
  end else begin : g_comb
    logic unused_clk;
    assign unused_clk = clk;
    for (genvar k = 0; k < M; k++) begin : g_bit
      assign p[k] = ^terms[k];
    end
  end
endmodule
