// Non-pipelined WG keystream generator (thesis Sec. 4.1, Fig. 4.1).
//
// An 11-stage LFSR over GF(2^29) feeds S(11) into the combinational WG core;
// the trace of the core output is the keystream bit, and during
// initialization the 29-bit core output is also added into the LFSR feedback.
// The controller wg_fsm sequences the three phases:
//   11 cycles REG_LOAD : din is shifted in, one LFSR word per cycle, the word
//                        for S(11) first and the word for S(1) last;
//   44 cycles INIT     : the LFSR runs with the WG core feedback;
//   RUN                : one keystream bit per cycle, ks_valid = 1.
// The key/IV layout of the 11 words is set by whoever drives din (see the
// testbench); the thesis loads an 80-bit key and a 32-bit IV serially this way.
// ks_valid is this design's addition to mark keystream cycles.
//
// Ports: clk, rst (synchronous, active high; restarts loading), din (29) ->
// ks, ks_valid, load (high while din is being sampled).
module wg_cipher
  import wg_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  gf_t  din,
  output logic ks,
  output logic ks_valid,
  output logic load
);
  logic       init;
  logic [1:0] state;
  gf_t        s11, fb;

  wg_fsm  u_fsm  (.clk(clk), .rst(rst), .init(init), .load(load), .state(state));
  wg_lfsr #(.PIPELINED_MUL(1'b0)) u_lfsr (
    .clk(clk), .ce(1'b1), .load(load), .init(init), .din(din), .fb(fb), .s11(s11));
  wg_core  u_core  (.clk(clk), .x(s11), .y(fb));
  wg_trace u_trace (.x(fb), .y(ks));

  assign ks_valid = (state == 2'b00);
endmodule
