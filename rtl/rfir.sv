// rfir: reconfigurable block transpose-form FIR filter.
//
// Filters a stream that arrives as blocks of L samples per cycle
// (x[l] = x(kL-l)) with one of P length-N channel filters chosen by sel, and
// returns a block of L outputs per cycle (y[l] = y(kL-l)). The structure is
// the document's: a coefficient selection unit (csu) with the P coefficient
// sets, a register unit (ru) that builds the L x L input matrix S0k, M = N/L
// inner-product units (ipu) that each multiply S0k by one short weight vector
// (the (i+1)-th unit takes c_{M-1-i}), and a pipeline adder unit (pau) that
// accumulates the partial blocks of successive cycles.
//
// Timing: a block presented with blk_valid high in cycle k gives its output
// block with out_valid high in cycle k+1. The csu reads its tables on every
// clock, so a new sel applies to blocks presented from the next cycle on;
// output blocks in the M-1 cycles after a switch mix partial sums of the old
// and the new filter, exactly as the transposed structure computes them.
// blk_valid low stalls the sample path (an idle cycle), which is this
// design's addition.
module rfir #(
  parameter int L  = fir_pkg::L_DEF,
  parameter int N  = fir_pkg::N_DEF,
  parameter int B  = fir_pkg::B_DEF,
  parameter int BC = fir_pkg::BC_DEF,
  parameter int BA = fir_pkg::BA_DEF,
  parameter int P  = fir_pkg::P_DEF
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [$clog2(P)-1:0] sel,
  input  logic                 blk_valid,
  input  logic signed [B-1:0]  x [L],
  output logic signed [BA-1:0] y [L],
  output logic                 out_valid
);

  localparam int M = N / L;

  logic signed [BC-1:0] c     [M][L];
  logic signed [B-1:0]  s     [L][L];
  logic signed [BA-1:0] r_ipu [M][L];   // output of the (i+1)-th IPU
  logic signed [BA-1:0] r     [M][L];   // r[m] = S0k * c_m

  csu #(.L(L), .N(N), .BC(BC), .P(P)) u_csu (
    .clk (clk),
    .sel (sel),
    .c   (c)
  );

  ru #(.L(L), .B(B)) u_ru (
    .clk (clk),
    .rst (rst),
    .en  (blk_valid),
    .x   (x),
    .s   (s)
  );

  for (genvar i = 0; i < M; i++) begin : g_ipu
    ipu #(.L(L), .B(B), .BC(BC), .BA(BA)) u_ipu (
      .s (s),
      .w (c[M - 1 - i]),
      .r (r_ipu[i])
    );
    assign r[M - 1 - i] = r_ipu[i];
  end

  pau #(.L(L), .N(N), .BA(BA)) u_pau (
    .clk       (clk),
    .rst       (rst),
    .en        (blk_valid),
    .r         (r),
    .y         (y),
    .out_valid (out_valid)
  );

endmodule
