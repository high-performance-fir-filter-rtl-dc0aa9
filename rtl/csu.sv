// csu: coefficient selection unit of the reconfigurable block FIR filter.
//
// Holds the coefficients of P channel filters in N read-only tables of P
// words, one table per filter tap, as the document describes. On every clock
// edge all N tables are read at address sel, so the whole coefficient set of
// the chosen filter is available one cycle later, arranged as M = N/L short
// weight vectors c[m][j] = h(mL+j). The table contents come from
// fir_pkg::rom_coef(); the registered read and the contents are this
// design's choices. There is no reset: c holds the selected filter from the
// first clock edge on.
module csu #(
  parameter int L  = fir_pkg::L_DEF,
  parameter int N  = fir_pkg::N_DEF,
  parameter int BC = fir_pkg::BC_DEF,
  parameter int P  = fir_pkg::P_DEF
) (
  input  logic                         clk,
  input  logic [$clog2(P)-1:0]         sel,
  output logic signed [BC-1:0]         c [N/L][L]
);

  localparam int M = N / L;

  for (genvar n = 0; n < N; n++) begin : g_tap
    // ROM of tap n: word p is h_p(n).
    logic signed [BC-1:0] rom [P];
    for (genvar p = 0; p < P; p++) begin : g_word
      assign rom[p] = BC'(fir_pkg::rom_coef(p, n));
    end

    always_ff @(posedge clk) begin
      c[n / L][n % L] <= rom[sel];
    end
  end

  initial begin
    assert (N % L == 0) else $error("csu: N must be a multiple of L");
    assert (M >= 1)     else $error("csu: N must be at least L");
  end

endmodule
