// nikhilam_mul: multiplier following the Nikhilam sutra ("all from 9 and the
// last from 10"), p = a * b, worked around a base BASE (default 100).
//
// Each number is replaced by its deficit from the base, d_a = BASE - a and
// d_b = BASE - b. The right-hand side is the product of the deficits,
// rhs = d_a * d_b; the left-hand side is the cross difference
// lhs = a - d_b (= b - d_a = a + b - BASE). The product is
//   p = lhs * BASE + rhs,
// which for numbers just below the base is lhs and rhs written side by side
// (96 x 93: lhs = 89, rhs = 28, p = 8928). Numbers above the base have a
// negative deficit (a surplus), and far from the base rhs can exceed BASE or
// lhs be negative; all internal values are signed, so p is exact for every
// input. Inputs and outputs are binary; W = clog2(BASE) bits per operand.
// The method and the base of 100 follow the design; the binary datapath, the
// signed handling and the plain multiplier for the deficit product are this
// implementation's choices. Purely combinational. The two top bits of the
// signed working sum are always 0 and are not brought out.
module nikhilam_mul #(
  parameter int unsigned BASE = 100,
  localparam int unsigned W = $clog2(BASE)
) (
  input  logic        [W-1:0]   a,
  input  logic        [W-1:0]   b,
  output logic signed [W+1:0]   lhs,
  output logic signed [2*W+1:0] rhs,
  output logic        [2*W-1:0] p
);
  localparam int unsigned PW = 2 * W + 2;  // signed working width

  logic signed [W+1:0] base_s, a_s, b_s, d_a, d_b;

  assign base_s = (W + 2)'(BASE);
  assign a_s    = {2'b00, a};
  assign b_s    = {2'b00, b};

  assign d_a = base_s - a_s;   // deficit (negative: surplus)
  assign d_b = base_s - b_s;

  assign lhs = a_s - d_b;      // cross subtraction
  assign rhs = PW'(d_a) * PW'(d_b);

  logic signed [PW-1:0] full;
  assign full = PW'(lhs) * PW'(base_s) + rhs;
  assign p    = full[2*W-1:0];
endmodule
