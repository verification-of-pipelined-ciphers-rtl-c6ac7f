// Eleven-stage LFSR over GF(2^29) with serial loading (WG state register).
//
// Stages S(1)..S(11) each hold a 29-bit field element; every shift moves
// S(i) to S(i+1) and writes S(1) from a multiplexer (thesis Table 4.1):
//   load = 1           : din (serial loading, one stage per shift; the word
//                        loaded first ends up in S(11) after 11 shifts)
//   load = 0, init = 1 : lfsr_fb ^ fb   (initialization: WG core feedback)
//   load = 0, init = 0 : lfsr_fb        (keystream generation)
// with lfsr_fb = gamma*S(11) ^ S(10) ^ S(8) ^ S(5) ^ S(2) ^ S(1), the feedback
// polynomial p(x) = gamma x^11 + x^10 + x^8 + x^5 + x^2 + x + 1 (eq. 2.12,
// Figs. 2.13 and 4.3). The output to the WG core is S(11).
//
// PIPELINED_MUL = 0 is the first design: the gamma multiplier is
// combinational and the register shifts whenever ce = 1 (tie ce high).
// PIPELINED_MUL = 1 is the optimized design: the multiplier has a free-running
// internal register, so gamma*S(11) is valid one cycle after S(11) last
// changed; the controller only raises ce after such a cycle.
//
// Ports: clk, ce, load, init, din (29), fb (29) -> s11 (29). No reset: the
// state is defined by the 11 load cycles.
module wg_lfsr
  import wg_pkg::*;
#(
  parameter bit PIPELINED_MUL = 1'b0
) (
  input  logic clk,
  input  logic ce,
  input  logic load,
  input  logic init,
  input  gf_t  din,
  input  gf_t  fb,
  output gf_t  s11
);
  gf_t s [1:11];
  gf_t gamma_s11, lfsr_fb, first;

  wg_nb_mul #(.PIPELINED(PIPELINED_MUL)) u_gamma (
    .clk(clk), .a(s[11]), .b(GAMMA_NB), .p(gamma_s11));

  assign lfsr_fb = gamma_s11 ^ s[10] ^ s[8] ^ s[5] ^ s[2] ^ s[1];

  always_comb begin
    if (load)      first = din;
    else if (init) first = lfsr_fb ^ fb;
    else           first = lfsr_fb;
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      s[1] <= first;
      for (int i = 2; i <= 11; i++) s[i] <= s[i-1];
    end
  end

  assign s11 = s[11];
endmodule
