// compressor_3_2: the CM3:2 cell of the compressor multiplier, a full adder.
// Three bits of equal weight are reduced to a sum bit of the same weight and
// a carry bit of twice the weight: x[0] + x[1] + x[2] = sum + 2*carry.
// Purely combinational. The design only names the cell; the full-adder
// realisation is the usual one and is this implementation's choice.
module compressor_3_2 (
  input  logic [2:0] x,
  output logic       sum,
  output logic       carry
);
  assign sum   = ^x;
  assign carry = (x[0] & x[1]) | (x[2] & (x[0] ^ x[1]));
endmodule
