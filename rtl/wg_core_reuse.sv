// Eleven-stage WG core with hardware re-use (optimized datapath).
//
// Computes the same permutation as wg_core, y = NOT(x' ^ q1 ^ q2 ^ q3 ^ q4)
// with x' = NOT x, using the nine-stage wg_pow1023_reuse block plus three
// two-stage multipliers MA, MB, MC instead of five combinational ones
// (thesis Sec. 4.3.2, Fig. 4.19). A packet entering with d_valid in cycle 0:
//   cycle 1      : Q1 holds x; x' = NOT Q1 enters the power block and Q2
//   cycles 2-6   : x' is carried in Q2..Q6 while the power block works
//   cycle 7 (V7=1): MA <- x', x'^(2^10) (q1);  MB <- x', x'^(2^19) (t)
//   cycle 9      : Q9 parks {x', q1, t}; e = x'^(2^10-1) leaves the power block
//   cycle 10 (V7=0): MA <- x', e^(2^9) (q3);   MB <- x'^(2^9), t (q2);
//                   MC <- x'^(2^19), e (q4); Q11 takes x' ^ q1
//   cycle 11     : y valid, d_ready = V11 = 1
// Q8 runs beside the internal stage of MA/MB and Q11 beside their second
// pass. Which multiplier computes which product on the second pass is this
// design's choice; the thesis gives the schedule, the register names and the
// latency, but its figure of the wiring is not available.
//
// Packets must be an even number of cycles apart (the controller sends one
// every 12 cycles during initialization and one every 2 cycles afterwards);
// otherwise a first pass and a second pass can meet at a multiplier. The
// valid bits V1..V11 follow the
// slots; d_ready is V11, the delayed d_valid the controller waits for.
//
// Ports: clk, rst (synchronous, clears the valid bits), d_valid, x ->
// y (29), d_ready. Latency 11 cycles.
module wg_core_reuse
  import wg_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic d_valid,
  input  gf_t  x,
  output gf_t  y,
  output logic d_ready
);
  logic [11:1] v;                       // V1..V11
  gf_t  q1_x;
  gf_t  qx [2:7];                       // x' carried in Q2..Q7
  gf_t  q8_x;
  gf_t  q9_x, q9_q1, q9_t;
  gf_t  q10_x, q10_q1, q10_t, q10_e;
  gf_t  q11_s;
  gf_t  xp, e;
  gf_t  ma_a, ma_b, ma_p, mb_a, mb_b, mb_p, mc_p;

  always_ff @(posedge clk) begin
    if (rst) v <= '0;
    else     v <= {v[10:1], d_valid};
    q1_x <= x;
  end

  assign xp = ~q1_x;

  wg_pow1023_reuse #(.INPUT_REG(1'b0)) u_pow (
    .clk(clk), .rst(rst), .d_valid(v[1]), .u(xp), .e(e));

  // Re-used multipliers: first pass from Q7, second pass from Q10.
  assign ma_a = v[7] ? qx[7]               : q10_x;
  assign ma_b = v[7] ? nb_frob(qx[7], 10)  : nb_frob(q10_e, 9);
  assign mb_a = v[7] ? qx[7]               : nb_frob(q10_x, 9);
  assign mb_b = v[7] ? nb_frob(qx[7], 19)  : q10_t;
  wg_nb_mul #(.PIPELINED(1'b1)) u_ma (.clk(clk), .a(ma_a), .b(ma_b), .p(ma_p));
  wg_nb_mul #(.PIPELINED(1'b1)) u_mb (.clk(clk), .a(mb_a), .b(mb_b), .p(mb_p));
  wg_nb_mul #(.PIPELINED(1'b1)) u_mc (.clk(clk), .a(nb_frob(q10_x, 19)), .b(q10_e), .p(mc_p));

  always_ff @(posedge clk) begin
    qx[2] <= xp;
    for (int i = 3; i <= 7; i++) qx[i] <= qx[i-1];
    q8_x   <= v[7] ? qx[7] : q10_x;
    q9_x   <= q8_x;
    q9_q1  <= ma_p;
    q9_t   <= mb_p;
    q10_x  <= q9_x;
    q10_q1 <= q9_q1;
    q10_t  <= q9_t;
    q10_e  <= e;
    q11_s  <= q10_x ^ q10_q1;
  end

  assign y       = ~(q11_s ^ ma_p ^ mb_p ^ mc_p);
  assign d_ready = v[11];
endmodule
