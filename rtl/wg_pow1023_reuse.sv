// Nine-stage u^(2^10 - 1) with two re-used, two-stage pipelined multipliers.
//
// The four multiplications of wg_pow1023 are mapped onto two multipliers,
// each used twice per data packet (thesis Sec. 4.3.2, Fig. 4.17). Packets
// enter at most every other cycle, marked by d_valid; the valid bits V1..V3
// travel with the slots and steer the multiplexers:
//   cycle 1 (V1=1): M1 <- u, u^2                 -> y          (cycles 1-2)
//   cycle 3 (V3=1): M2 <- y, y^(2^2)             -> y*y^4      (cycles 3-4)
//   cycle 5       : parked in Q5 while M1 serves the next packet
//   cycle 6 (V1=0): M1 <- y*y^4 (Q6), u^(2^4)    -> z          (cycles 6-7)
//   cycle 8 (V3=0): M2 <- z, z^(2^5)             -> u^(2^10-1) (cycles 8-9)
// Registers Q2 and Q4 run beside the multipliers' internal stage, Q3 holds the
// M1 result, Q5/Q6 delay the M2 result of the first pass back to M1.
// The register names, the latency and the slot schedule are the thesis';
// the detailed wiring of its figure is not available and was reconstructed
// from the schedule and the stage-by-stage description.
//
// With INPUT_REG = 1 the block registers its input (Q1, V1) itself; with
// INPUT_REG = 0 the caller has already done so (the WG core moves Q1 in
// front of its inverter) and u/d_valid are taken as the Q1/V1 contents.
//
// Ports: clk, rst (synchronous, clears V1..V3), d_valid, u -> e.
// Timing (INPUT_REG = 1): u presented with d_valid in cycle t gives e in cycle
// t + 9. Packets must be an even number of cycles apart (at most one per two
// cycles); e is meaningful only in cycle t + 9.
module wg_pow1023_reuse
  import wg_pkg::*;
#(
  parameter bit INPUT_REG = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic d_valid,
  input  gf_t  u,
  output gf_t  e
);
  gf_t  q1_u, q2_u, q3_m, q3_u, q4_u, q5_p, q5_u, q6_p, q6_u;
  logic v1, v2, v3;
  gf_t  m1_a, m1_b, m1_p, m2_b, m2_p;

  if (INPUT_REG) begin : g_q1
    always_ff @(posedge clk) begin
      if (rst) v1 <= 1'b0;
      else     v1 <= d_valid;
      q1_u <= u;
    end
  end else begin : g_no_q1
    assign v1   = d_valid;
    assign q1_u = u;
  end

  // First multiplier: u * u^2 (new packet) or (y*y^4) * u^16 (second pass).
  assign m1_a = v1 ? q1_u             : q6_p;
  assign m1_b = v1 ? nb_frob(q1_u, 1) : nb_frob(q6_u, 4);
  wg_nb_mul #(.PIPELINED(1'b1)) u_m1 (.clk(clk), .a(m1_a), .b(m1_b), .p(m1_p));

  // Second multiplier: m * m^(2^2) on the first pass, m * m^(2^5) on the second.
  assign m2_b = v3 ? nb_frob(q3_m, 2) : nb_frob(q3_m, 5);
  wg_nb_mul #(.PIPELINED(1'b1)) u_m2 (.clk(clk), .a(q3_m), .b(m2_b), .p(m2_p));

  always_ff @(posedge clk) begin
    if (rst) begin
      v2 <= 1'b0;
      v3 <= 1'b0;
    end else begin
      v2 <= v1;
      v3 <= v2;
    end
    q2_u <= v1 ? q1_u : q6_u;     // beside M1's internal stage
    q3_m <= m1_p;
    q3_u <= q2_u;
    q4_u <= q3_u;                 // beside M2's internal stage
    q5_p <= m2_p;
    q5_u <= q4_u;
    q6_p <= q5_p;
    q6_u <= q5_u;
  end

  assign e = m2_p;
endmodule
