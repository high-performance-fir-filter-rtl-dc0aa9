// tb_paper_workloads: the two filter experiments of the reference evaluation,
// run on fir_top at its default sizes.
//  - Reconfigurable filter, coefficient set 0, 1, 2, 3, 4, 5 (filter 3 of the
//    tables), driven with a constant input of 1: the output climbs through
//    the running sums 0, 1, 3, 6, 10 and settles at 15.
//  - Fixed-coefficient filter with 15 coefficients, driven with a constant
//    input of 1: the output follows the running sums of the coefficients and
//    settles at their sum, 10.
//  - Filter 0 of the tables begins with 32, 40, -109, 83, 67; its impulse
//    response must show them.
// Outputs are compared sample by sample with the running sums computed here.
module tb_paper_workloads;
  localparam int L = fir_pkg::L_DEF, N = fir_pkg::N_DEF, B = fir_pkg::B_DEF;
  localparam int BA = fir_pkg::BA_DEF, P = fir_pkg::P_DEF;
  localparam int NB = 12;   // blocks per experiment

  logic clk = 1'b0;
  logic rst;
  logic [$clog2(P)-1:0] r_sel;
  logic r_blk_valid, f_blk_valid, r_out_valid, f_out_valid;
  logic signed [B-1:0]  r_x [L], f_x [L];
  logic signed [BA-1:0] r_y [L], f_y [L];
  int checks = 0, failures = 0;
  int r_settled = 0, f_settled = 0;

  fir_top dut (
    .clk(clk), .rst(rst),
    .r_sel(r_sel), .r_blk_valid(r_blk_valid), .r_x(r_x), .r_y(r_y), .r_out_valid(r_out_valid),
    .f_blk_valid(f_blk_valid), .f_x(f_x), .f_y(f_y), .f_out_valid(f_out_valid));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h0 [5] = '{32, 40, -109, 83, 67};
    rst = 1'b1;
    r_blk_valid = 1'b0; f_blk_valid = 1'b0;
    r_sel = 2'd3;
    for (int l = 0; l < L; l++) begin r_x[l] = '0; f_x[l] = '0; end
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    // step responses: a constant 1 from sample 0 on
    for (int k = 0; k < NB; k++) begin
      r_blk_valid = 1'b1; f_blk_valid = 1'b1;
      for (int l = 0; l < L; l++) begin r_x[l] = 8'sd1; f_x[l] = 8'sd1; end
      @(negedge clk);
      checks += 2;
      if (!r_out_valid || !f_out_valid) failures++;
      for (int l = 0; l < L; l++) begin
        int n, er, ef;
        n = k * L + L - 1 - l;           // sample index of output l
        er = 0; ef = 0;
        for (int i = 0; i <= n && i < N; i++) begin
          er += fir_pkg::rom_coef(3, i);
          ef += fir_pkg::FIXED_H[i];
        end
        checks += 2;
        if (r_y[l] !== BA'(er)) begin
          failures++;
          $display("reconfigurable step: y(%0d)=%0d expected %0d", n, r_y[l], er);
        end
        if (f_y[l] !== BA'(ef)) begin
          failures++;
          $display("fixed step: y(%0d)=%0d expected %0d", n, f_y[l], ef);
        end
        if (n >= N) begin
          if (r_y[l] == 15) r_settled++;
          if (f_y[l] == 10) f_settled++;
        end
      end
    end
    $display("settled outputs: reconfigurable 15 x%0d, fixed 10 x%0d", r_settled, f_settled);
    checks += 2;
    if (r_settled == 0) failures++;
    if (f_settled == 0) failures++;
    // impulse through filter 0
    r_sel = 2'd0;
    f_blk_valid = 1'b0;
    for (int l = 0; l < L; l++) r_x[l] = '0;
    r_blk_valid = 1'b0;
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 2; k++) begin
      r_blk_valid = 1'b1;
      for (int l = 0; l < L; l++) r_x[l] = (k == 0 && l == L - 1) ? 8'sd1 : 8'sd0;
      @(negedge clk);
      for (int l = 0; l < L; l++) begin
        int n;
        n = k * L + L - 1 - l;
        if (n < 5) begin
          checks++;
          if (r_y[l] !== BA'(h0[n])) begin
            failures++;
            $display("filter 0 tap %0d = %0d expected %0d", n, r_y[l], h0[n]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
