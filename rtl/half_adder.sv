// half_adder: one-bit half adder cell ("HA" in the adder drawing).
// Purely combinational: s = a xor b, c = a and b.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
