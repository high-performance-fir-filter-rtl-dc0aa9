// mcm_fir: fixed-coefficient block transpose-form FIR filter built from
// multiple constant multiplications (MCM).
//
// For one filter known at design time the coefficient selection unit and the
// multiplier-based inner-product units are not needed. The register unit (ru)
// still forms the input matrix S0k of the current block; its 2L-1 distinct
// samples x(kL), ..., x(kL-2L+2) each feed one MCM block (mcm_block) that
// multiplies the sample by the coefficient groups it meets, by shifts and
// adds only. The adder network (mcm_adder_net) sums the products into the
// inner products r[m][l] = (S0k c_m)[l], and the pipeline adder unit (pau)
// accumulates them over successive blocks exactly as in the reconfigurable
// filter. Seven MCM blocks are used for L = 4, one per sample of the
// document's table. H is the coefficient set (N entries, each must fit in the
// coefficient width used by the products); its default is
// fir_pkg::FIXED_H, this design's example 15-tap set.
//
// Timing: as rfir, a block presented with blk_valid high in cycle k gives its
// output block with out_valid high in cycle k+1; blk_valid low stalls.
module mcm_fir #(
  parameter int L  = fir_pkg::L_DEF,
  parameter int N  = fir_pkg::N_DEF,
  parameter int B  = fir_pkg::B_DEF,
  parameter int BA = fir_pkg::BA_DEF,
  parameter int H [N] = fir_pkg::FIXED_H
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 blk_valid,
  input  logic signed [B-1:0]  x [L],
  output logic signed [BA-1:0] y [L],
  output logic                 out_valid
);

  localparam int M = N / L;

  logic signed [B-1:0]  s    [L][L];
  logic signed [B-1:0]  smp  [2*L-1];          // smp[j] = x(kL-j)
  logic signed [BA-1:0] prod [2*L-1][L][M];    // by sample, group, m
  logic signed [BA-1:0] r    [M][L];

  ru #(.L(L), .B(B)) u_ru (
    .clk (clk),
    .rst (rst),
    .en  (blk_valid),
    .x   (x),
    .s   (s)
  );

  // Row 0 of S0k holds x(kL)..x(kL-L+1), row L-1 holds x(kL-L+1)..x(kL-2L+2).
  for (genvar j = 0; j < 2 * L - 1; j++) begin : g_smp
    if (j < L) begin : g_row0
      assign smp[j] = s[0][j];
    end else begin : g_rowl
      assign smp[j] = s[L - 1][j - L + 1];
    end
  end

  for (genvar j = 0; j < 2 * L - 1; j++) begin : g_mcm
    localparam int G0 = fir_pkg::g_lo(j, L);
    localparam int NG = fir_pkg::n_groups(j, L);
    logic signed [BA-1:0] p [NG][M];

    mcm_block #(.L(L), .N(N), .B(B), .BA(BA), .J(j), .H(H)) u_mcm (
      .x    (smp[j]),
      .prod (p)
    );

    for (genvar g = 0; g < L; g++) begin : g_grp
      if (g >= G0 && g < G0 + NG) begin : g_used
        assign prod[j][g] = p[g - G0];
      end else begin : g_none
        // This sample never meets group g; the adder network does not read it.
        assign prod[j][g] = '{default: '0};
      end
    end
  end

  mcm_adder_net #(.L(L), .N(N), .BA(BA)) u_net (
    .prod (prod),
    .r    (r)
  );

  pau #(.L(L), .N(N), .BA(BA)) u_pau (
    .clk       (clk),
    .rst       (rst),
    .en        (blk_valid),
    .r         (r),
    .y         (y),
    .out_valid (out_valid)
  );

endmodule
