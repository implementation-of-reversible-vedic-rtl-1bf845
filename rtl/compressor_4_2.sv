// compressor_4_2: the CM4:2 cell of the compressor multiplier.
// Four bits and a carry-in of equal weight are reduced to one sum bit of the
// same weight and two bits (carry, cout) of twice the weight:
//   x[0] + x[1] + x[2] + x[3] + cin = sum + 2*(carry + cout).
// Built as two cascaded full adders: the first adds x[0..2] and gives cout
// (which therefore never depends on cin), the second adds the first sum,
// x[3] and cin. Purely combinational. The design names the cell but not its
// gates; the two-full-adder structure is this implementation's choice.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1;

  compressor_3_2 u_fa1 (.x(x[2:0]),          .sum(s1),  .carry(cout));
  compressor_3_2 u_fa2 (.x({cin, x[3], s1}), .sum(sum), .carry(carry));
endmodule
