// rca: W-bit ripple carry adder, {cout, sum} = a + b + cin.
// A chain of W full adders (compressor_3_2 cells); the carry ripples from
// bit 0 to bit W-1. Purely combinational; delay grows linearly with W.
// Used by the 4x4 block multiplier (W = 4 as in the design, and 6) and as the
// per-stage adder of the CI-CSKA.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] cy;

  assign cy[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    compressor_3_2 u_fa (.x({cy[i], b[i], a[i]}), .sum(sum[i]), .carry(cy[i+1]));
  end
  assign cout = cy[W];
endmodule
