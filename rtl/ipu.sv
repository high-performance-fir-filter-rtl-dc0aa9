// ipu: inner-product unit of the reconfigurable block FIR filter.
//
// Multiplies the L x L input matrix S0k from the register unit by one short
// weight vector c_m = [h(mL), ..., h(mL+L-1)] and returns the block of L
// partial filter outputs r[l] = sum_j s[l][j] * c_m[j]. It holds L
// inner-product cells sharing the weight vector, one per row of S0k, as in
// the document. Combinational; arithmetic modulo 2^BA.
module ipu #(
  parameter int L  = fir_pkg::L_DEF,
  parameter int B  = fir_pkg::B_DEF,
  parameter int BC = fir_pkg::BC_DEF,
  parameter int BA = fir_pkg::BA_DEF
) (
  input  logic signed [B-1:0]  s [L][L],
  input  logic signed [BC-1:0] w [L],
  output logic signed [BA-1:0] r [L]
);

  for (genvar l = 0; l < L; l++) begin : g_cell
    ip_cell #(.L(L), .B(B), .BC(BC), .BA(BA)) u_cell (
      .row (s[l]),
      .w   (w),
      .ip  (r[l])
    );
  end

endmodule
