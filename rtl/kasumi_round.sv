// One KASUMI round (combinational).
//
// Odd rounds (ODD = 1) compute f = FO(FL(L, KL), KO, KI); even rounds
// (ODD = 0) compute f = FL(FO(L, KO, KI), KL). The round output is
//   L_i = R_{i-1} xor f,  R_i = L_{i-1}
// (thesis eq. 2.1-2.2).
//
// Ports: din = {L_{i-1}, R_{i-1}} (64), rk (round subkeys) -> dout (64).
module kasumi_round
  import kasumi_pkg::*;
#(
  parameter bit ODD = 1'b1
) (
  input  logic [63:0] din,
  input  round_key_t  rk,
  output logic [63:0] dout
);
  logic [31:0] first_out, f;

  if (ODD) begin : g_odd
    kasumi_fl u_fl (.din(din[63:32]), .kl(rk.kl), .dout(first_out));
    kasumi_fo u_fo (.din(first_out), .ko(rk.ko), .ki(rk.ki), .dout(f));
  end else begin : g_even
    kasumi_fo u_fo (.din(din[63:32]), .ko(rk.ko), .ki(rk.ki), .dout(first_out));
    kasumi_fl u_fl (.din(first_out), .kl(rk.kl), .dout(f));
  end

  assign dout = {din[31:0] ^ f, din[63:32]};
endmodule
