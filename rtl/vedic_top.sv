// vedic_top: the Vedic-arithmetic datapaths side by side.
//
//   ut_*   4x4 Urdhva Tiryakbhayam multiplier reduced with compressors
//          (ut_mul_4x4, the main design): ut_c = ut_a * ut_b
//   blk_*  4x4 Urdhva Tiryakbhayam multiplier built from four 2x2 Vedic
//          multipliers and ripple carry adders: blk_c = blk_a * blk_b
//   add_*  CI-CSKA carry skip adder: {add_co, add_s} = add_a + add_b + add_ci
//   nik_*  Nikhilam multiplier around base NIK_BASE: nik_p = nik_a * nik_b,
//          with the sutra's two halves nik_lhs and nik_rhs brought out
//
// The four units share no signal; each has its own ports. Everything is
// combinational: results follow their inputs after the logic settles, there
// is no clock and no reset.
module vedic_top #(
  parameter int unsigned CSKA_N   = 32,
  parameter int unsigned CSKA_M   = 4,
  parameter int unsigned NIK_BASE = 100,
  localparam int unsigned NW = $clog2(NIK_BASE)
) (
  input  logic        [3:0]        ut_a,
  input  logic        [3:0]        ut_b,
  output logic        [7:0]        ut_c,

  input  logic        [3:0]        blk_a,
  input  logic        [3:0]        blk_b,
  output logic        [7:0]        blk_c,

  input  logic        [CSKA_N-1:0] add_a,
  input  logic        [CSKA_N-1:0] add_b,
  input  logic                     add_ci,
  output logic        [CSKA_N-1:0] add_s,
  output logic                     add_co,

  input  logic        [NW-1:0]     nik_a,
  input  logic        [NW-1:0]     nik_b,
  output logic signed [NW+1:0]     nik_lhs,
  output logic signed [2*NW+1:0]   nik_rhs,
  output logic        [2*NW-1:0]   nik_p
);
  ut_mul_4x4 u_ut (.a(ut_a), .b(ut_b), .c(ut_c));

  ut_mul_4x4_blk u_blk (.a(blk_a), .b(blk_b), .c(blk_c));

  ci_cska #(.N(CSKA_N), .M(CSKA_M)) u_cska (
    .a(add_a), .b(add_b), .ci(add_ci), .s(add_s), .co(add_co)
  );

  nikhilam_mul #(.BASE(NIK_BASE)) u_nik (
    .a(nik_a), .b(nik_b), .lhs(nik_lhs), .rhs(nik_rhs), .p(nik_p)
  );
endmodule
