// half_adder: one-bit half adder, s = x xor y, c = x and y.
// Purely combinational, no clock. It is the cell that forms bit 1 of the
// compressor multiplier and the chain of the CI-CSKA incrementation block;
// the design names it and uses the standard circuit.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
