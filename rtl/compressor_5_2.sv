// compressor_5_2: the CM5:2 cell of the compressor multiplier.
// Five bits and two carry-ins of equal weight are reduced to one sum bit of
// the same weight and three bits (carry, cout[0], cout[1]) of twice the weight:
//   x[0] + ... + x[4] + cin[0] + cin[1] = sum + 2*(carry + cout[0] + cout[1]).
// Built from three cascaded full adders: FA1 adds x[0..2] (carry -> cout[0]),
// FA2 adds FA1's sum, x[3] and x[4] (carry -> cout[1]), FA3 adds FA2's sum and
// the two carry-ins (sum, carry). The couts never depend on cin. Purely
// combinational. The design names the cell; its gates are this
// implementation's choice.
module compressor_5_2 (
  input  logic [4:0] x,
  input  logic [1:0] cin,
  output logic       sum,
  output logic       carry,
  output logic [1:0] cout
);
  logic s1, s2;

  compressor_3_2 u_fa1 (.x(x[2:0]),             .sum(s1),  .carry(cout[0]));
  compressor_3_2 u_fa2 (.x({x[4], x[3], s1}),   .sum(s2),  .carry(cout[1]));
  compressor_3_2 u_fa3 (.x({cin[1], cin[0], s2}), .sum(sum), .carry(carry));
endmodule
