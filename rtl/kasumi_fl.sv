// KASUMI FL function (combinational).
//
// Splits the 32-bit input into L (upper) and R (lower) halves and the 32-bit
// subkey into KL_i1 (upper) and KL_i2 (lower):
//   R' = R xor ROL1(L and KL_i1),  L' = L xor ROL1(R' or KL_i2),  out = {L', R'}.
// This is the thesis' equations (2.3)-(2.4), whose "ROL" is a one-bit left
// rotation as in the KASUMI standard.
//
// Ports: din (32), kl (32) -> dout (32). Purely combinational.
module kasumi_fl
  import kasumi_pkg::*;
(
  input  logic [31:0] din,
  input  logic [31:0] kl,
  output logic [31:0] dout
);
  logic [15:0] l, r, r_new, l_new;

  always_comb begin
    l     = din[31:16];
    r     = din[15:0];
    r_new = r ^ rol16(l & kl[31:16], 1);
    l_new = l ^ rol16(r_new | kl[15:0], 1);
    dout  = {l_new, r_new};
  end
endmodule
