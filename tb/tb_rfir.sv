// tb_rfir: self-checking testbench of the reconfigurable block FIR filter.
// Phase 1 sends a unit impulse through each of the P filters and checks that
// the output stream is that filter's coefficient list. Phase 2 streams random
// blocks with random idle cycles and random filter switches, and checks every
// output block against a direct convolution done here:
//   y(n) = sum_{m,j} h_{f(k-m)}(mL+j) * x(n-mL-j)
// where f(k') is the filter in force for block k' (the select value of the
// cycle before that block), so the blocks that straddle a switch are checked
// too. out_valid must follow each valid block by exactly one cycle.
module tb_rfir;
  localparam int L = 4, N = 16, B = 8, BC = 8, BA = 16, P = 4, M = N / L;
  localparam int NBLK = 600;

  logic clk = 1'b0;
  logic rst, blk_valid;
  logic [$clog2(P)-1:0] sel;
  logic signed [B-1:0]  x [L];
  logic signed [BA-1:0] y [L];
  logic out_valid;
  int checks = 0, failures = 0;
  int switches = 0, idles = 0, straddles = 0;

  rfir #(.L(L), .N(N), .B(B), .BC(BC), .BA(BA), .P(P)) dut (
    .clk(clk), .rst(rst), .sel(sel), .blk_valid(blk_valid), .x(x), .y(y), .out_valid(out_valid));

  always #5 clk = ~clk;

  int xh   [NBLK * L];      // sample history, stream order
  int fblk [NBLK];          // filter used by each block
  int nblk;

  function automatic int xs(input int n);
    return (n < 0) ? 0 : xh[n];
  endfunction

  function automatic logic signed [BA-1:0] ref_y(input int k, input int l);
    longint acc = 0;
    int n = k * L + L - 1 - l;
    for (int m = 0; m < M; m++)
      if (k - m >= 0)
        for (int j = 0; j < L; j++)
          acc += longint'(fir_pkg::rom_coef(fblk[k - m], m * L + j)) * xs(n - m * L - j);
    return BA'(acc);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sel_held: the select value driven during the previous cycle, which the
  // CSU registered at the last edge and so presents during this cycle.
  int sel_held;

  // One cycle: drive a block (if v) with the current sel on the wire,
  // advance one clock, check the output, then drive the next select value.
  task automatic step(input logic v, input int nsel);
    blk_valid = v;
    if (v) begin
      for (int l = 0; l < L; l++) xh[nblk * L + L - 1 - l] = int'(x[l]);
      fblk[nblk] = sel_held;
    end
    @(negedge clk);
    sel_held = int'(sel);
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("rfir out_valid=%0d expected %0d", out_valid, v);
    end
    if (v) begin
      for (int l = 0; l < L; l++) begin
        checks++;
        if (y[l] !== ref_y(nblk, l)) begin
          failures++;
          $display("rfir mismatch blk %0d l=%0d got %0d exp %0d", nblk, l, y[l], ref_y(nblk, l));
        end
      end
      if (v && nblk >= 1 && fblk[nblk] != fblk[nblk - 1]) straddles++;
      nblk++;
    end
    if (nsel != int'(sel)) switches++;
    sel = $clog2(P)'(nsel);
  endtask

  initial begin
    rst = 1'b1; blk_valid = 1'b0; sel = '0;
    for (int l = 0; l < L; l++) x[l] = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    nblk = 0;
    sel_held = 0;
    // Phase 1: impulse response of each filter, after M zero blocks
    for (int p = 0; p < P; p++) begin
      step(1'b0, p);
      step(1'b0, p);
      for (int k = 0; k < 2 * M + 1; k++) begin
        for (int l = 0; l < L; l++) x[l] = (k == M && l == L - 1) ? 8'sd1 : 8'sd0;
        step(1'b1, p);
        // the impulse is x(ML); output element l of block k is
        // y(kL+L-1-l) = h((k-M)L + L-1-l), zero past the last tap
        if (k >= M)
          for (int l = 0; l < L; l++) begin
            int tap;
            tap = (k - M) * L + L - 1 - l;
            checks++;
            if (y[l] !== ((tap < N) ? BA'(fir_pkg::rom_coef(p, tap)) : '0)) begin
              failures++;
              $display("impulse filter %0d tap %0d got %0d", p, tap, y[l]);
            end
          end
      end
    end
    // Phase 2: random stream with idle cycles and filter switches
    for (int t = 0; nblk < NBLK; t++) begin
      logic v;
      int ns;
      v = ($urandom_range(0, 5) != 0);
      if (!v) idles++;
      for (int l = 0; l < L; l++) x[l] = B'($urandom);
      ns = ($urandom_range(0, 9) == 0) ? $urandom_range(0, P - 1) : int'(sel);
      step(v, ns);
    end
    $display("rfir: %0d switches, %0d blocks straddling a switch, %0d idle cycles",
             switches, straddles, idles);
    if (switches == 0 || idles == 0 || straddles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
