// mcm_adder_net: adder network of the fixed-coefficient block FIR filter.
//
// Adds the MCM products into the inner products of the block formulation,
//   r[m][l] = sum_{g=0}^{L-1} x(kL-l-g) * h(mL+g),
// taking product x(kL-j) * h(mL+g) from the MCM block of sample j = l+g.
// The input is flattened per sample: prod[j][g][m] is that product for every
// group g the sample meets (entries outside a sample's groups are not read).
// Combinational, modulo 2^BA. The sums are the document's matrix product;
// their plain adder-chain form (no further sharing) is this design's choice.
module mcm_adder_net #(
  parameter int L  = fir_pkg::L_DEF,
  parameter int N  = fir_pkg::N_DEF,
  parameter int BA = fir_pkg::BA_DEF
) (
  input  logic signed [BA-1:0] prod [2*L-1][L][N/L],
  output logic signed [BA-1:0] r    [N/L][L]
);

  localparam int M = N / L;

  always_comb begin
    for (int m = 0; m < M; m++) begin
      for (int l = 0; l < L; l++) begin
        r[m][l] = '0;
        for (int g = 0; g < L; g++) begin
          r[m][l] = r[m][l] + prod[l + g][g][m];
        end
      end
    end
  end

endmodule
