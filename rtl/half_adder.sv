// half_adder: one-bit half adder, s = a xor b, co = a and b. Combinational
// helper cell of the reduction tree and the bias adder.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
