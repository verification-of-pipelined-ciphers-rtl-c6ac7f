// Optimized WG keystream generator: pipelined and with hardware re-use
// (thesis Sec. 4.3, Fig. 4.20).
//
// Same function as wg_cipher, built from the eleven-stage re-use core
// (wg_core_reuse), an LFSR with chip enable and a two-stage gamma multiplier,
// a register Q12 in front of the trace, and the controller wg_fsm_opt that
// generates ce and d_valid from the core's d_ready:
//   11 cycles REG_LOAD : din shifted in as in wg_cipher (S(11) word first);
//   528 cycles INIT    : 44 packets, each S(11) -> core (11 cycles) -> LFSR
//                        (1 cycle); the LFSR shifts once per packet;
//   RUN                : one packet every two cycles; the LFSR shifts every
//                        other cycle, and one keystream bit leaves Q12 and
//                        the trace every other cycle with ks_valid = 1.
// The first keystream bit appears 12 cycles after RUN starts (11 core stages
// plus Q12). The keystream equals that of wg_cipher bit for bit; only its
// timing differs. ks_valid is this design's addition.
//
// Ports: clk, rst (synchronous, active high), din (29) -> ks, ks_valid, load.
module wg_cipher_opt
  import wg_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  gf_t  din,
  output logic ks,
  output logic ks_valid,
  output logic load
);
  logic       init, ce, d_valid, d_ready;
  logic [1:0] state;
  gf_t        s11, fb, q12;
  logic       q12_valid;

  wg_fsm_opt u_fsm (
    .clk(clk), .rst(rst), .d_ready(d_ready), .init(init), .load(load),
    .ce(ce), .d_valid(d_valid), .state(state));
  wg_lfsr #(.PIPELINED_MUL(1'b1)) u_lfsr (
    .clk(clk), .ce(ce), .load(load), .init(init), .din(din), .fb(fb), .s11(s11));
  wg_core_reuse u_core (
    .clk(clk), .rst(rst), .d_valid(d_valid), .x(s11), .y(fb), .d_ready(d_ready));

  always_ff @(posedge clk) begin
    if (rst) q12_valid <= 1'b0;
    else     q12_valid <= d_ready && (state == 2'b00);
    q12 <= fb;
  end

  wg_trace u_trace (.x(q12), .y(ks));
  assign ks_valid = q12_valid;
endmodule
