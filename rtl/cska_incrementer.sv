// cska_incrementer: incrementation block of one CI-CSKA stage, s = z + cin.
// The stage's RCA has already added its operand bits with carry-in 0 and
// produced the intermediate result z. This block adds the carry that arrives
// from the previous stage with a chain of M half adders. cout is the carry of
// the last half adder; the adder does not use it (the stage carry comes from
// the skip logic instead, which is faster). Purely combinational.
// The half-adder chain follows the design; M is a parameter of this
// implementation (the design leaves stage sizes open).
module cska_incrementer #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] z,
  input  logic         cin,
  output logic [M-1:0] s,
  output logic         cout
);
  logic [M:0] cy;

  assign cy[0] = cin;
  for (genvar i = 0; i < M; i++) begin : g_ha
    half_adder u_ha (.x(z[i]), .y(cy[i]), .s(s[i]), .c(cy[i+1]));
  end
  assign cout = cy[M];
endmodule
