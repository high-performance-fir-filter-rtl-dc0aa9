// ip_cell: inner-product cell of an inner-product unit.
//
// Computes ip = sum_j row[j] * w[j] over the L entries of one row of the
// input matrix S0k and a short weight vector, as in the document: L
// multipliers followed by the additions. The additions are arranged to match
// the document's cycle time T = TM + TA + TFA log2 L (one multiplier, one
// adder, log2 L full-adder levels): the L products are reduced to two in
// carry-save form by levels of 3:2 full-adder compressors, and a single
// carry-propagate adder adds the last two. For L = 4 that is two compressor
// levels and one adder. The reduction schedule is computed at elaboration
// from L; the compressor arrangement is this design's reading of the
// document's timing formula. Purely combinational. Operands are two's
// complement; products and the sum are taken modulo 2^BA (BA is B + BC by
// default, the register width the document gives for the partial sums).
module ip_cell #(
  parameter int L  = fir_pkg::L_DEF,
  parameter int B  = fir_pkg::B_DEF,
  parameter int BC = fir_pkg::BC_DEF,
  parameter int BA = fir_pkg::BA_DEF
) (
  input  logic signed [B-1:0]  row [L],
  input  logic signed [BC-1:0] w   [L],
  output logic signed [BA-1:0] ip
);

  // Number of operands left after v compressor levels.
  function automatic int ops_at(input int v);
    int c;
    c = L;
    for (int i = 0; i < v; i++)
      if (c > 2) c = 2 * (c / 3) + (c % 3);
    return c;
  endfunction

  // Compressor levels needed to get down to two operands.
  function automatic int n_levels();
    int v;
    v = 0;
    while (ops_at(v) > 2) v++;
    return v;
  endfunction

  localparam int NLV = n_levels();

  // g_lvl[v].op holds the operands after v compressor levels.
  for (genvar v = 0; v <= NLV; v++) begin : g_lvl
    logic [BA-1:0] op [L];
    if (v == 0) begin : g_mul
      for (genvar j = 0; j < L; j++) begin : g_p
        assign op[j] = BA'(BA'(row[j]) * BA'(w[j]));
      end
    end else begin : g_red
      localparam int C = ops_at(v - 1);
      localparam int F = C / 3;        // full groups of three
      localparam int R = C % 3;        // operands passed down unchanged
      for (genvar g = 0; g < F; g++) begin : g_csa
        logic [BA-1:0] a, b, c;
        assign a = g_lvl[v - 1].op[3 * g];
        assign b = g_lvl[v - 1].op[3 * g + 1];
        assign c = g_lvl[v - 1].op[3 * g + 2];
        assign op[2 * g]     = a ^ b ^ c;
        assign op[2 * g + 1] = ((a & b) | (a & c) | (b & c)) << 1;
      end
      for (genvar r = 0; r < R; r++) begin : g_pass
        assign op[2 * F + r] = g_lvl[v - 1].op[3 * F + r];
      end
      for (genvar u = 2 * F + R; u < L; u++) begin : g_unused
        assign op[u] = '0;
      end
    end
  end

  // final carry-propagate adder
  if (ops_at(NLV) >= 2) begin : g_cpa
    assign ip = g_lvl[NLV].op[0] + g_lvl[NLV].op[1];
  end else begin : g_one
    assign ip = g_lvl[NLV].op[0];
  end

endmodule
