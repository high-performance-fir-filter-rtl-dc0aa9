// pau: pipeline adder unit of the block transpose-form FIR filter.
//
// Adds the M blocks of partial outputs r[m] (from weight vector c_m) of
// successive cycles to the filter output block
//   y_k = r_0(k) + r_1(k-1) + ... + r_{M-1}(k-M+1),
// i.e. the document's recurrence Y = z^-1( ... z^-1(z^-1 r_{M-1} + r_{M-2})
// ... ) + r_0. As in the document it is a transposed chain of M-1 block
// adders and M-1 block registers; all L lanes of a block move together.
// This design adds one more register on the final sum, so y and out_valid
// appear one cycle after the block that completes them. The chain advances
// only when en is high; reset clears it. Sums wrap modulo 2^BA.
module pau #(
  parameter int L  = fir_pkg::L_DEF,
  parameter int N  = fir_pkg::N_DEF,
  parameter int BA = fir_pkg::BA_DEF
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [BA-1:0] r [N/L][L],
  output logic signed [BA-1:0] y [L],
  output logic                 out_valid
);

  localparam int M = N / L;

  // acc[m] is the partial sum r_{m+1}(k-1) + ... + r_{M-1}(k-M+m+1) that
  // block k adds to its own r_m: the register after adder m+1 in the chain.
  localparam int NR = (M > 1) ? M - 1 : 1;
  logic signed [BA-1:0] acc [NR][L];
  logic signed [BA-1:0] sum [M][L];

  always_comb begin
    for (int m = 0; m < M; m++) begin
      for (int l = 0; l < L; l++) begin
        if (m < M - 1) sum[m][l] = r[m][l] + acc[m][l];
        else           sum[m][l] = r[m][l];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int m = 0; m < NR; m++) acc[m] <= '{default: '0};
      for (int l = 0; l < L; l++) y[l] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        for (int m = 0; m < M - 1; m++) acc[m] <= sum[m + 1];
        for (int l = 0; l < L; l++) y[l] <= sum[0][l];
      end
    end
  end

endmodule
