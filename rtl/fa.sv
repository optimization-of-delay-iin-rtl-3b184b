// fa: one-bit full adder, the 3:2 counter of the Wallace tree and the
// ripple cell of the alpha-bit adder. Purely combinational.
module fa (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule
