// Top level: the two ciphers of the thesis side by side.
//
// KASUMI (64-bit block, 128-bit key):
//   kasumi_comb  - the non-pipelined specification, purely combinational:
//                  kc_dout = E_key(kc_din) in the same cycle.
//   kasumi_pipe  - the pipelined implementation with KASUMI_STAGES = 8, 16
//                  or 32 stages: one block per cycle in, kp_out_valid and
//                  kp_dout exactly KASUMI_STAGES cycles later.
// WG (stream cipher over GF(2^29), 11-word state):
//   wg_cipher     - first design, one keystream bit per cycle after 11 load
//                   and 44 initialization cycles.
//   wg_cipher_opt - pipelined design with hardware re-use, one keystream bit
//                   every two cycles after 11 load and 528 initialization
//                   cycles.
// Both WG generators share rst and the serial load word wg_din: after rst
// both sample wg_din for the same 11 cycles (wg_load / wgo_load high), so they
// are loaded with the same key and IV and produce the same keystream at
// different rates.
//
// All ports are plain signals; rst is synchronous and active high. Putting
// the blocks together in one top and sharing the WG load port is this
// design's choice; the thesis treats the ciphers separately.
module pipelined_ciphers_top #(
  parameter int unsigned KASUMI_STAGES = 8
) (
  input  logic         clk,
  input  logic         rst,
  // KASUMI, combinational specification
  input  logic [63:0]  kc_din,
  input  logic [127:0] kc_key,
  output logic [63:0]  kc_dout,
  // KASUMI, pipelined
  input  logic         kp_in_valid,
  input  logic [63:0]  kp_din,
  input  logic [127:0] kp_key,
  output logic         kp_out_valid,
  output logic [63:0]  kp_dout,
  // WG, shared serial load word
  input  logic [28:0]  wg_din,
  // WG, non-pipelined
  output logic         wg_ks,
  output logic         wg_ks_valid,
  output logic         wg_load,
  // WG, optimized
  output logic         wgo_ks,
  output logic         wgo_ks_valid,
  output logic         wgo_load
);
  kasumi_comb u_kasumi_comb (.din(kc_din), .key(kc_key), .dout(kc_dout));

  kasumi_pipe #(.STAGES(KASUMI_STAGES)) u_kasumi_pipe (
    .clk(clk), .rst(rst), .in_valid(kp_in_valid), .din(kp_din), .key(kp_key),
    .out_valid(kp_out_valid), .dout(kp_dout));

  wg_cipher u_wg (
    .clk(clk), .rst(rst), .din(wg_din), .ks(wg_ks), .ks_valid(wg_ks_valid),
    .load(wg_load));

  wg_cipher_opt u_wg_opt (
    .clk(clk), .rst(rst), .din(wg_din), .ks(wgo_ks), .ks_valid(wgo_ks_valid),
    .load(wgo_load));
endmodule
