// ha: one-bit half adder, the 2:2 counter of the Wallace tree and the
// first cell of the alpha-bit adder chain. Purely combinational.
module ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
