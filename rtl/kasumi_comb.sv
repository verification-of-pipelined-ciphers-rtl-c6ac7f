// Purely combinational KASUMI block cipher (the non-pipelined reference).
//
// A 64-bit block {L_0, R_0} passes through eight rounds (kasumi_round; rounds
// 1,3,5,7 apply FL then FO, rounds 2,4,6,8 apply FO then FL) with subkeys from
// kasumi_keysched; the output is {L_8, R_8}. This is the first, non-pipelined
// implementation of the thesis, which it uses as the specification that the
// pipelined versions (kasumi_pipe) are checked against. Encryption only: the
// thesis notes decryption is the same datapath with the key schedule reversed,
// but builds and tests encryption.
//
// Ports: din (64), key (128) -> dout (64). No clock; latency zero.
module kasumi_comb
  import kasumi_pkg::*;
(
  input  logic [63:0]  din,
  input  logic [127:0] key,
  output logic [63:0]  dout
);
  round_key_t  rk [8];
  logic [63:0] state [9];

  kasumi_keysched u_ks (.key(key), .rk(rk));

  assign state[0] = din;
  for (genvar i = 0; i < 8; i++) begin : g_round
    kasumi_round #(.ODD(i % 2 == 0)) u_round (.din(state[i]), .rk(rk[i]), .dout(state[i+1]));
  end
  assign dout = state[8];
endmodule
