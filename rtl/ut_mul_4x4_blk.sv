// ut_mul_4x4_blk: 4x4 unsigned Urdhva Tiryakbhayam multiplier built from four
// 2x2 Vedic multipliers and ripple carry adders, c = a * b.
//
// Split a = {aH, aL}, b = {bH, bL} into 2-bit halves:
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH
//   c = q0 + 4*(q1 + q2) + 16*q3
// The two low bits of q0 are the two low bits of c. The first (4-bit) RCA
// adds {2'b00, q0[3:2]} to q1. The second RCA adds q2 and q3 at their relative
// weight, {2'b00, q2} + {q3, 2'b00}; this needs 6 bits (up to 9 + 36 = 45), so
// it is 6 bits wide although the design calls it a four-bit adder. A third,
// 6-bit RCA sums the two results and gives c[7:2]. The halves, the first RCA
// and the final summation follow the design; the widths of the second and
// third adders are this implementation's choice. Purely combinational.
// The carry out of the final adder (c_fin) is always 0 and is left unused.
module ut_mul_4x4_blk (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] c
);
  logic [3:0] q0, q1, q2, q3;

  vedic_mul_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .q(q0));
  vedic_mul_2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .q(q1));
  vedic_mul_2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .q(q2));
  vedic_mul_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .q(q3));

  // first adder: upper bits of q0 plus q1, 5-bit result (weight 4)
  logic [3:0] s_lo;
  logic       c_lo;
  rca #(.W(4)) u_add_lo (.a({2'b00, q0[3:2]}), .b(q1), .cin(1'b0), .sum(s_lo), .cout(c_lo));

  // second adder: q2 + 4*q3, 6-bit result (weight 4)
  logic [5:0] s_hi;
  logic       c_hi;
  rca #(.W(6)) u_add_hi (.a({2'b00, q2}), .b({q3, 2'b00}), .cin(1'b0), .sum(s_hi), .cout(c_hi));

  // final adder: the two partial sums; c_hi and the final carry are always 0
  // because a*b <= 225
  logic       c_fin;
  rca #(.W(6)) u_add_fin (.a({1'b0, c_lo, s_lo}), .b(s_hi), .cin(c_hi), .sum(c[7:2]), .cout(c_fin));

  assign c[1:0] = q0[1:0];
endmodule
