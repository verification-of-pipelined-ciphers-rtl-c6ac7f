// KASUMI FI function (combinational).
//
// The 16-bit input is split into a 9-bit left half and a 7-bit right half,
// which pass twice through the S9/S7 substitution pair with truncation and
// zero-extension XORs between them; the 16-bit subkey KI_ij is mixed in
// between the two passes (its upper 7 bits into the 7-bit half, its lower
// 9 bits into the 9-bit half). The result is {7-bit half, 9-bit half}.
// The thesis treats FI as the lowest-level building block and refers to the
// KASUMI standard for its insides; the structure here is that standard's.
//
// Ports: din (16), ki (16) -> dout (16). Purely combinational, no clock.
module kasumi_fi
  import kasumi_pkg::*;
(
  input  logic [15:0] din,
  input  logic [15:0] ki,
  output logic [15:0] dout
);
  logic [8:0] nine0, nine1, nine2, nine3;
  logic [6:0] seven0, seven1, seven2, seven3;

  always_comb begin
    nine0  = din[15:7];
    seven0 = din[6:0];
    nine1  = S9[nine0] ^ {2'b00, seven0};           // R1 = S9[L0] ^ ZE(R0)
    seven1 = S7[seven0] ^ nine1[6:0];               // S7[L1] ^ TR(R1)
    seven2 = seven1 ^ ki[15:9];                     // ^ KI_ij,1
    nine2  = nine1 ^ ki[8:0];                       // ^ KI_ij,2
    nine3  = S9[nine2] ^ {2'b00, seven2};
    seven3 = S7[seven2] ^ nine3[6:0];
    dout   = {seven3, nine3};
  end
endmodule
