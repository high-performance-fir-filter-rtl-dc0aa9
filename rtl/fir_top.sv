// fir_top: the two block transpose-form FIR filters side by side.
//
// r_*: the reconfigurable filter (rfir), P channel filters of length N held
//      in coefficient tables and selected by r_sel, multiplier-based.
// f_*: the fixed-coefficient filter (mcm_fir), one length-N filter built
//      from shift-and-add constant multipliers.
// Both take a block of L samples per cycle (x[l] = x(kL-l)) and return a
// block of L outputs (y[l] = y(kL-l)) one cycle after the block that
// completes them. They share only the clock and the synchronous reset.
// The two filters are the reference design's two variants of one block
// formulation; placing them in one top, and the valid/reset conventions of
// the ports, are this design's choices.
module fir_top #(
  parameter int L  = fir_pkg::L_DEF,
  parameter int N  = fir_pkg::N_DEF,
  parameter int B  = fir_pkg::B_DEF,
  parameter int BC = fir_pkg::BC_DEF,
  parameter int BA = fir_pkg::BA_DEF,
  parameter int P  = fir_pkg::P_DEF
) (
  input  logic                 clk,
  input  logic                 rst,
  // reconfigurable filter
  input  logic [$clog2(P)-1:0] r_sel,
  input  logic                 r_blk_valid,
  input  logic signed [B-1:0]  r_x [L],
  output logic signed [BA-1:0] r_y [L],
  output logic                 r_out_valid,
  // fixed-coefficient filter
  input  logic                 f_blk_valid,
  input  logic signed [B-1:0]  f_x [L],
  output logic signed [BA-1:0] f_y [L],
  output logic                 f_out_valid
);

  rfir #(.L(L), .N(N), .B(B), .BC(BC), .BA(BA), .P(P)) u_rfir (
    .clk       (clk),
    .rst       (rst),
    .sel       (r_sel),
    .blk_valid (r_blk_valid),
    .x         (r_x),
    .y         (r_y),
    .out_valid (r_out_valid)
  );

  mcm_fir #(.L(L), .N(N), .B(B), .BA(BA)) u_mcm_fir (
    .clk       (clk),
    .rst       (rst),
    .blk_valid (f_blk_valid),
    .x         (f_x),
    .y         (f_y),
    .out_valid (f_out_valid)
  );

endmodule
