// Trace Tr(x) from GF(2^29) to GF(2) in the normal basis.
//
// Every normal-basis element has trace one, so the trace of x is the XOR of
// its 29 bits (thesis Sec. 4.1.1). Ports: x (29) -> y (1). Combinational.
module wg_trace
  import wg_pkg::*;
(
  input  gf_t  x,
  output logic y
);
  assign y = ^x;
endmodule
