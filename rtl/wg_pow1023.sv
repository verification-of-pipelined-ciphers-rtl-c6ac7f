// Combinational u^(2^10 - 1) in the GF(2^29) normal basis.
//
// Uses the three-step decomposition of the thesis (Sec. 4.1.1, Fig. 4.2):
//   y = u * u^2,   z = y * y^(2^2) * u^(2^4),   u^(2^10-1) = z * z^(2^5),
// i.e. four multipliers and free rotations for the squarings.
//
// Ports: u (29) -> e (29). Purely combinational (the clock only reaches the
// multiplier instances, which are combinational here).
module wg_pow1023
  import wg_pkg::*;
(
  input  logic clk,
  input  gf_t  u,
  output gf_t  e
);
  gf_t y, yy, z;

  wg_nb_mul #(.PIPELINED(1'b0)) u_m1 (.clk(clk), .a(u),  .b(nb_frob(u, 1)),  .p(y));
  wg_nb_mul #(.PIPELINED(1'b0)) u_m2 (.clk(clk), .a(y),  .b(nb_frob(y, 2)),  .p(yy));
  wg_nb_mul #(.PIPELINED(1'b0)) u_m3 (.clk(clk), .a(yy), .b(nb_frob(u, 4)),  .p(z));
  wg_nb_mul #(.PIPELINED(1'b0)) u_m4 (.clk(clk), .a(z),  .b(nb_frob(z, 5)),  .p(e));
endmodule
