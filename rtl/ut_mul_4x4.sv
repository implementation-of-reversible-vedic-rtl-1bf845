// ut_mul_4x4: 4x4 unsigned Urdhva Tiryakbhayam ("vertically and crosswise")
// multiplier reduced with compressors, c = a * b.
//
// All sixteen partial products P_ij = a[i] & b[j] are formed at once. Each
// result bit k is the sum of the partial products with i + j = k plus the
// carries of column k-1, and each column has one cell:
//   bit 0: AND            P00                          -> c[0]
//   bit 1: half adder     P01 P10                      -> c[1]
//   bit 2: CM4:2          P11 P02 P20 + 1 carry        -> c[2]
//   bit 3: CM5:2          P30 P03 P21 P12 + 2 carries  -> c[3]
//   bit 4: CM5:2          P31 P13 P22 + 3 carries      -> c[4]
//   bit 5: CM4:2          P32 P23 + 3 carries          -> c[5]
//   bit 6: CM3:2          P33 + 2 carries              -> c[6], carry -> c[7]
// The column/cell order and the port names a, b, c follow the design; which
// carry enters which compressor pin is this implementation's choice (every
// carry of a column goes to the next column, so the sum is exact).
// Purely combinational: no clock, no reset, the product settles after the
// carry has rippled through the seven columns.
module ut_mul_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] c
);
  logic [3:0][3:0] p;   // p[i][j] = a[i] & b[j]

  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        p[i][j] = a[i] & b[j];
  end

  // carries between columns
  logic       c1;                  // bit 1 -> bit 2
  logic [1:0] c2;                  // bit 2 -> bit 3
  logic [2:0] c3;                  // bit 3 -> bit 4
  logic [2:0] c4;                  // bit 4 -> bit 5
  logic [1:0] c5;                  // bit 5 -> bit 6

  assign c[0] = p[0][0];

  half_adder u_b1 (.x(p[0][1]), .y(p[1][0]), .s(c[1]), .c(c1));

  compressor_4_2 u_b2 (
    .x    ({c1, p[2][0], p[0][2], p[1][1]}),
    .cin  (1'b0),
    .sum  (c[2]), .carry(c2[0]), .cout(c2[1])
  );

  compressor_5_2 u_b3 (
    .x    ({1'b0, p[1][2], p[2][1], p[0][3], p[3][0]}),
    .cin  (c2),
    .sum  (c[3]), .carry(c3[0]), .cout(c3[2:1])
  );

  compressor_5_2 u_b4 (
    .x    ({c3[1], c3[0], p[2][2], p[1][3], p[3][1]}),
    .cin  ({1'b0, c3[2]}),
    .sum  (c[4]), .carry(c4[0]), .cout(c4[2:1])
  );

  compressor_4_2 u_b5 (
    .x    ({c4[1], c4[0], p[2][3], p[3][2]}),
    .cin  (c4[2]),
    .sum  (c[5]), .carry(c5[0]), .cout(c5[1])
  );

  compressor_3_2 u_b6 (
    .x    ({c5[1], c5[0], p[3][3]}),
    .sum  (c[6]), .carry(c[7])
  );
endmodule
