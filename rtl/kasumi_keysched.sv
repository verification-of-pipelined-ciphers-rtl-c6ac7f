// KASUMI key schedule (combinational).
//
// The 128-bit key is cut into eight 16-bit words K_1..K_8 (K_1 in the upper
// bits) and K'_j = K_j xor C_j is formed with the constants of kasumi_pkg.
// Round i (i = 1..8, indices mod 8) then takes
//   KL_i1 = ROL1(K_i),     KL_i2 = K'_{i+2},
//   KO_i1 = ROL5(K_{i+1}), KO_i2 = ROL8(K_{i+5}), KO_i3 = ROL13(K_{i+6}),
//   KI_i1 = K'_{i+4},      KI_i2 = K'_{i+3},     KI_i3 = K'_{i+7}.
// The thesis only says the subkeys come from XORs and bit permutations of the
// key as specified by the KASUMI standard; the rule above is the standard's,
// and reproduces the subkeys the thesis prints for its test key.
//
// Ports: key (128) -> rk[0..7] (round 1 in rk[0]). Purely combinational.
module kasumi_keysched
  import kasumi_pkg::*;
(
  input  logic [127:0] key,
  output round_key_t   rk [8]
);
  logic [15:0] k  [8];
  logic [15:0] kp [8];

  always_comb begin
    for (int j = 0; j < 8; j++) begin
      k[j]  = key[127-16*j -: 16];
      kp[j] = k[j] ^ KS_C[j];
    end
    for (int i = 0; i < 8; i++) begin
      rk[i].kl = {rol16(k[i], 1), kp[(i+2)%8]};
      rk[i].ko = {rol16(k[(i+1)%8], 5), rol16(k[(i+5)%8], 8), rol16(k[(i+6)%8], 13)};
      rk[i].ki = {kp[(i+4)%8], kp[(i+3)%8], kp[(i+7)%8]};
    end
  end
endmodule
