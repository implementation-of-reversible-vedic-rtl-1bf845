// ci_cska: N-bit concatenation-incrementation carry skip adder (CI-CSKA),
// {co, s} = a + b + ci.
//
// The operands are cut into Q = N/M stages of M bits. Stage 1 is a plain
// RCA with carry-in ci. Every other stage j has an RCA whose carry-in is tied
// to 0, so all RCAs work at the same time ("concatenation"); it yields the
// intermediate sum Z_j and its carry C_j. An incrementation block (chain of
// half adders) then adds the carry CO_(j-1) of the previous stage to Z_j to
// give the final sum bits. The stage carry does not wait for that block: the
// skip logic forms
//   CO_j = C_j | (P_j & CO_(j-1)),   P_j = AND of all bits of Z_j
// which is exact, because Z_j + 1 overflows only when Z_j is all ones, and
// then C_j is 0.
// The skip logic is a single compound gate per stage, so the carry changes
// polarity from stage to stage: even stages (2, 4, ...) use an AOI gate and
// pass on ~CO_j; odd stages (3, 5, ...) use an OAI gate on ~CO_(j-1) and pass
// on CO_j. A stage that receives a complemented carry inverts it once for its
// incrementation block, and co is inverted once if Q is even.
// The structure and the alternating polarity follow the design; N = 32 and
// equal stage sizes M = 4 are this implementation's choice (the design leaves
// them open). Purely combinational. The incrementers' own carry outputs
// (inc_co) are deliberately left unused.
module ci_cska #(
  parameter int unsigned N = 32,
  parameter int unsigned M = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] s,
  output logic         co
);
  localparam int unsigned Q = N / M;

  if (N % M != 0 || Q < 1) begin : g_bad_size
    $error("ci_cska: N must be a positive multiple of M");
  end

  // carry leaving each stage, as the skip gate drives it: true polarity for
  // stage index k even (design stages 1, 3, ...), complemented for k odd
  logic [Q-1:0] cpol;

  // stage 1: RCA with the adder's carry in
  rca #(.W(M)) u_rca0 (
    .a(a[M-1:0]), .b(b[M-1:0]), .cin(ci), .sum(s[M-1:0]), .cout(cpol[0])
  );

  for (genvar k = 1; k < Q; k++) begin : g_stage
    logic [M-1:0] z;      // intermediate sum Z_j
    logic         cj;     // RCA carry C_j
    logic         pj;     // all bits of Z_j are one
    logic         cin_t;  // CO_(j-1) in true polarity, for the incrementer
    logic         inc_co; // incrementer carry: not used for the stage carry

    rca #(.W(M)) u_rca (
      .a(a[k*M +: M]), .b(b[k*M +: M]), .cin(1'b0), .sum(z), .cout(cj)
    );

    assign pj = &z;

    if (k % 2 == 1) begin : g_aoi
      // design stage j = k+1 is even: incoming carry is true, output inverted
      assign cin_t   = cpol[k-1];
      assign cpol[k] = ~(cj | (pj & cpol[k-1]));
    end else begin : g_oai
      // design stage j = k+1 is odd: incoming carry is complemented
      assign cin_t   = ~cpol[k-1];
      assign cpol[k] = ~(~cj & (~pj | cpol[k-1]));
    end

    cska_incrementer #(.M(M)) u_inc (
      .z(z), .cin(cin_t), .s(s[k*M +: M]), .cout(inc_co)
    );
  end

  assign co = (Q % 2 == 0) ? ~cpol[Q-1] : cpol[Q-1];
endmodule
