// Combinational WG core: the 29-bit WG permutation t(x+1)+1 over GF(2^29).
//
// With x' = x + 1 (bitwise inversion in the normal basis) and e = x'^(2^10-1):
//   q1 = x' * x'^(2^10)
//   q2 = x'^(2^9) * (x' * x'^(2^19))
//   q3 = x' * e^(2^9)
//   q4 = x'^(2^19) * e
//   y  = NOT(x' ^ q1 ^ q2 ^ q3 ^ q4)
// which is t(x') = x' + x'^q1 + ... + x'^q4 with the exponents of eq. (2.15)
// rewritten as in eq. (2.17) and drawn in Fig. 2.14 of the thesis. The trace
// of y (wg_trace) is the WG keystream bit; y itself is the feedback into the
// LFSR during initialization.
//
// Ports: x (29) -> y (29). Purely combinational.
module wg_core
  import wg_pkg::*;
(
  input  logic clk,
  input  gf_t  x,
  output gf_t  y
);
  gf_t xp, e, q1, t, q2, q3, q4;

  assign xp = ~x;
  wg_pow1023 u_pow (.clk(clk), .u(xp), .e(e));
  wg_nb_mul #(.PIPELINED(1'b0)) u_q1 (.clk(clk), .a(xp), .b(nb_frob(xp, 10)), .p(q1));
  wg_nb_mul #(.PIPELINED(1'b0)) u_t  (.clk(clk), .a(xp), .b(nb_frob(xp, 19)), .p(t));
  wg_nb_mul #(.PIPELINED(1'b0)) u_q2 (.clk(clk), .a(nb_frob(xp, 9)), .b(t), .p(q2));
  wg_nb_mul #(.PIPELINED(1'b0)) u_q3 (.clk(clk), .a(xp), .b(nb_frob(e, 9)), .p(q3));
  wg_nb_mul #(.PIPELINED(1'b0)) u_q4 (.clk(clk), .a(nb_frob(xp, 19)), .b(e), .p(q4));
  assign y = ~(xp ^ q1 ^ q2 ^ q3 ^ q4);
endmodule
