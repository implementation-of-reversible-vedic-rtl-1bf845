// vedic_mul_2x2: 2x2 unsigned Urdhva Tiryakbhayam multiplier, q = a * b.
// Vertical: q[0] = a0 b0. Crosswise: a1 b0 + a0 b1 in a half adder gives q[1]
// and a carry. Vertical: a1 b1 plus that carry in a second half adder gives
// q[2] and q[3]. Four ANDs and two half adders; purely combinational.
// The design uses this cell as the base of its 4x4 block multiplier without
// drawing it; the gate structure above is this implementation's choice.
module vedic_mul_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic cross_c;

  assign q[0] = a[0] & b[0];
  half_adder u_cross (.x(a[1] & b[0]), .y(a[0] & b[1]), .s(q[1]), .c(cross_c));
  half_adder u_high  (.x(a[1] & b[1]), .y(cross_c),     .s(q[2]), .c(q[3]));
endmodule
