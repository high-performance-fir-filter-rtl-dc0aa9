// mcm_block: multiple-constant-multiplication block of one input sample.
//
// In the fixed-coefficient filter, sample x(kL-J) of the input matrix meets
// the coefficient groups g = g_lo(J)..g_hi(J) (group g is
// {h(g), h(g+L), ..., h(g+(M-1)L)}), as tabulated in the document for
// L = 4, N = 16. This block forms all those products with shifts and adds
// only, and shares work between the constants:
//  - every constant c is written as c = +/- f * 2^s with f odd;
//  - each distinct odd factor f ("fundamental") is built once, as a sum of
//    shifted and negated copies of the sample given by the canonical signed
//    digit recoding of f;
//  - every product is its fundamental shifted by s and negated if c < 0.
// So constants such as 13, -13 and 26 cost one shift-add chain between them,
// which symmetric filters, whose groups repeat coefficients, profit from.
// prod[q][m] = x * H[mL + g_lo(J) + q], modulo 2^BA. Combinational.
// The document does not spell out its MCM algorithm; the odd-fundamental
// sharing above is this design's choice, and subexpressions inside
// different fundamentals are not shared.
module mcm_block #(
  parameter int L  = fir_pkg::L_DEF,
  parameter int N  = fir_pkg::N_DEF,
  parameter int B  = fir_pkg::B_DEF,
  parameter int BA = fir_pkg::BA_DEF,
  parameter int J  = 0,
  parameter int H [N] = fir_pkg::FIXED_H
) (
  input  logic signed [B-1:0]  x,
  output logic signed [BA-1:0] prod [fir_pkg::n_groups(J, L)][N/L]
);

  localparam int M  = N / L;
  localparam int G0 = fir_pkg::g_lo(J, L);
  localparam int NG = fir_pkg::n_groups(J, L);
  localparam int NK = NG * M;          // constants of this block, t = q*M + m

  function automatic int kconst(input int t);
    return H[(t % M) * L + G0 + t / M];
  endfunction

  function automatic int kabs(input int t);
    return (kconst(t) < 0) ? -kconst(t) : kconst(t);
  endfunction

  // power of two in |c| (0 for c = 0)
  function automatic int kshift(input int t);
    int v, s;
    v = kabs(t);
    s = 0;
    if (v == 0) return 0;
    while ((v % 2) == 0) begin
      v = v / 2;
      s++;
    end
    return s;
  endfunction

  function automatic int kodd(input int t);
    return kabs(t) >> kshift(t);
  endfunction

  // first constant of this block with the same odd factor
  function automatic int kfirst(input int t);
    for (int u = 0; u < t; u++)
      if (kodd(u) == kodd(t)) return u;
    return t;
  endfunction

  logic signed [BA-1:0] xe;
  assign xe = BA'(x);

  logic signed [BA-1:0] fund [NK];     // fundamentals, at their first user

  for (genvar t = 0; t < NK; t++) begin : g_k
    localparam int          F   = kodd(t);
    localparam int          SH  = kshift(t);
    localparam int          SRC = kfirst(t);
    localparam bit          NEGK = kconst(t) < 0;
    localparam logic [31:0] POS = fir_pkg::csd_pos(F);
    localparam logic [31:0] NEG = fir_pkg::csd_neg(F);

    if (SRC == t) begin : g_fund
      // shift-add chain of the odd factor F
      always_comb begin
        fund[t] = '0;
        for (int i = 0; i < BA; i++) begin
          if (POS[i]) fund[t] = fund[t] + (xe <<< i);
          if (NEG[i]) fund[t] = fund[t] - (xe <<< i);
        end
      end
    end else begin : g_shared
      assign fund[t] = '0;             // unused: this constant reuses fund[SRC]
    end

    if (NEGK) begin : g_neg
      assign prod[t / M][t % M] = -(fund[SRC] <<< SH);
    end else begin : g_pos
      assign prod[t / M][t % M] = fund[SRC] <<< SH;
    end
  end

endmodule
