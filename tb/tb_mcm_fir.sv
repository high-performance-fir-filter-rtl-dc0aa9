// tb_mcm_fir: self-checking testbench of the fixed-coefficient MCM filter.
// Two instances: one with the default coefficient set, one with extreme
// coefficients (large magnitudes of both signs) so that sums wrap at 16 bits.
// Each gets an impulse (its output must be its coefficient list), then random
// blocks with idle cycles; every output block is compared with a direct
// convolution y(n) = sum_i h(i) x(n-i) modulo 2^16, and out_valid must follow
// each valid block by exactly one cycle.
module tb_mcm_fir;
  localparam int L = 4, N = 16, B = 8, BA = 16;
  localparam int NBLK = 500;
  localparam int HX [N] = '{127, -128, 127, -128, 127, -128, 127, -128,
                            -128, 127, -128, 127, -128, 127, -128, 127};

  logic clk = 1'b0;
  logic rst, blk_valid;
  logic signed [B-1:0]  x [L];
  logic signed [BA-1:0] y0 [L], y1 [L];
  logic ov0, ov1;
  int checks = 0, failures = 0;
  int idles = 0, wraps = 0;

  mcm_fir #(.L(L), .N(N), .B(B), .BA(BA)) dut0 (
    .clk(clk), .rst(rst), .blk_valid(blk_valid), .x(x), .y(y0), .out_valid(ov0));
  mcm_fir #(.L(L), .N(N), .B(B), .BA(BA), .H(HX)) dut1 (
    .clk(clk), .rst(rst), .blk_valid(blk_valid), .x(x), .y(y1), .out_valid(ov1));

  always #5 clk = ~clk;

  int xh [NBLK * L];
  int nblk;

  function automatic longint conv(input int k, input int l, input int which);
    longint acc = 0;
    int n = k * L + L - 1 - l;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) acc += longint'(which == 0 ? fir_pkg::FIXED_H[i] : HX[i]) * xh[n - i];
    return acc;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic v);
    longint e;
    blk_valid = v;
    if (v) for (int l = 0; l < L; l++) xh[nblk * L + L - 1 - l] = int'(x[l]);
    @(negedge clk);
    checks += 2;
    if (ov0 !== v) failures++;
    if (ov1 !== v) failures++;
    if (v) begin
      for (int l = 0; l < L; l++) begin
        e = conv(nblk, l, 0);
        checks++;
        if (y0[l] !== BA'(e)) begin
          failures++;
          $display("mcm_fir mismatch blk %0d l=%0d got %0d exp %0d", nblk, l, y0[l], BA'(e));
        end
        e = conv(nblk, l, 1);
        if (e > 32767 || e < -32768) wraps++;
        checks++;
        if (y1[l] !== BA'(e)) begin
          failures++;
          $display("mcm_fir(HX) mismatch blk %0d l=%0d got %0d exp %0d", nblk, l, y1[l], BA'(e));
        end
      end
      nblk++;
    end
  endtask

  initial begin
    rst = 1'b1; blk_valid = 1'b0;
    for (int l = 0; l < L; l++) x[l] = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    nblk = 0;
    // impulse at x(0): the outputs are h(0), h(1), ...
    for (int k = 0; k < N / L + 1; k++) begin
      for (int l = 0; l < L; l++) x[l] = (k == 0 && l == L - 1) ? 8'sd1 : 8'sd0;
      step(1'b1);
      for (int l = 0; l < L; l++) begin
        int tap;
        tap = k * L + L - 1 - l;
        checks++;
        if (y0[l] !== ((tap < N) ? BA'(fir_pkg::FIXED_H[tap]) : '0)) begin
          failures++;
          $display("impulse tap %0d got %0d", tap, y0[l]);
        end
      end
    end
    // random stream; every fifth block at full scale to force wrap-around
    while (nblk < NBLK) begin
      logic v;
      v = ($urandom_range(0, 5) != 0);
      if (!v) idles++;
      for (int l = 0; l < L; l++)
        x[l] = (nblk % 5 == 0) ? ((l % 2 == 0) ? 8'sd127 : -8'sd128) : B'($urandom);
      step(v);
    end
    $display("mcm_fir: %0d idle cycles, %0d wrapped outputs", idles, wraps);
    if (idles == 0 || wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
