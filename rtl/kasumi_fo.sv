// KASUMI FO function (combinational).
//
// Three Feistel rounds on 16-bit halves (thesis eq. 2.5-2.6, Fig. 2.11):
//   R_j = FI(L_{j-1} xor KO_ij, KI_ij) xor R_{j-1},  L_j = R_{j-1},  j = 1..3,
// output {L_3, R_3}. Built from three kasumi_fi instances, as the thesis
// builds FO from FI blocks, XOR gates and re-wiring.
//
// Ports: din (32), ko = {KO_i1,KO_i2,KO_i3} (48), ki = {KI_i1,KI_i2,KI_i3} (48)
// -> dout (32). Purely combinational.
module kasumi_fo (
  input  logic [31:0] din,
  input  logic [47:0] ko,
  input  logic [47:0] ki,
  output logic [31:0] dout
);
  logic [15:0] l [4];
  logic [15:0] r [4];
  logic [15:0] fi_in [3];
  logic [15:0] fi_out [3];

  assign l[0] = din[31:16];
  assign r[0] = din[15:0];

  for (genvar j = 0; j < 3; j++) begin : g_round
    assign fi_in[j] = l[j] ^ ko[47-16*j -: 16];
    kasumi_fi u_fi (.din(fi_in[j]), .ki(ki[47-16*j -: 16]), .dout(fi_out[j]));
    assign r[j+1] = fi_out[j] ^ r[j];
    assign l[j+1] = r[j];
  end

  assign dout = {l[3], r[3]};
endmodule
