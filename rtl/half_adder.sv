// half_adder: one-bit half adder, the first element of every EHRCA bit slice.
//
// s = a xor b, c = a and b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  assign s = a ^ b;
  assign c = a & b;

endmodule
