// ru: register unit of the block transpose-form FIR filter.
//
// Each cycle it receives one block of L samples, x[l] = x(kL-l), and forms
// the L x L input matrix S0k whose row l is
//   s[l][j] = x(kL-l-j),  0 <= j < L.
// The entries with l+j < L come from the current block; the others are the
// first L-1 samples of the previous block, which are held in L-1 B-bit
// registers, as in the document. The registers advance when en is high
// (a valid block is present) and clear on the synchronous reset, so the
// samples before the first block read as zero. s is combinational from x and
// the registers: the matrix for block k is valid in the cycle block k is.
module ru #(
  parameter int L = fir_pkg::L_DEF,
  parameter int B = fir_pkg::B_DEF
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [B-1:0] x [L],
  output logic signed [B-1:0] s [L][L]
);

  // prev[i] = x((k-1)L - i), i = 0..L-2
  logic signed [B-1:0] prev [L-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < L - 1; i++) prev[i] <= '0;
    end else if (en) begin
      for (int i = 0; i < L - 1; i++) prev[i] <= x[i];
    end
  end

  always_comb begin
    for (int l = 0; l < L; l++) begin
      for (int j = 0; j < L; j++) begin
        if (l + j < L) s[l][j] = x[l + j];
        else           s[l][j] = prev[l + j - L];
      end
    end
  end

endmodule
