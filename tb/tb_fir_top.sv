// tb_fir_top: end-to-end testbench of fir_top at its default sizes
// (L = 4, N = 16, 8-bit samples and coefficients, 16-bit outputs, P = 4).
// Both filters run at once from independent stimulus:
//  - impulse responses of the fixed filter and of every reconfigurable
//    filter, checked against the coefficient lists;
//  - a long random stream with idle cycles on both sides, filter switches on
//    the reconfigurable side (blocks straddling a switch included), full-scale
//    blocks that make the 16-bit sums wrap, and a reset in mid-stream;
//  - every output block compared with a direct convolution done here, and
//    out_valid required exactly one cycle after each valid block.
// Each of these mechanisms is counted; one that never occurs is a failure.
module tb_fir_top;
  localparam int L = fir_pkg::L_DEF, N = fir_pkg::N_DEF, B = fir_pkg::B_DEF;
  localparam int BA = fir_pkg::BA_DEF, P = fir_pkg::P_DEF, M = N / L;
  localparam int NBLK = 3000;

  logic clk = 1'b0;
  logic rst;
  logic [$clog2(P)-1:0] r_sel;
  logic r_blk_valid, f_blk_valid, r_out_valid, f_out_valid;
  logic signed [B-1:0]  r_x [L], f_x [L];
  logic signed [BA-1:0] r_y [L], f_y [L];
  int checks = 0, failures = 0;
  int switches = 0, straddles = 0, r_idles = 0, f_idles = 0, wraps = 0, resets = 0;

  fir_top dut (
    .clk(clk), .rst(rst),
    .r_sel(r_sel), .r_blk_valid(r_blk_valid), .r_x(r_x), .r_y(r_y), .r_out_valid(r_out_valid),
    .f_blk_valid(f_blk_valid), .f_x(f_x), .f_y(f_y), .f_out_valid(f_out_valid));

  always #5 clk = ~clk;

  // stream histories since the last reset, in stream order
  int rxh [NBLK * L], fxh [NBLK * L];
  int rf  [NBLK];          // filter in force for each reconfigurable block
  int rn, fn;              // blocks since the last reset
  int sel_held;            // select value the CSU presents this cycle

  function automatic longint r_ref(input int k, input int l);
    longint acc = 0;
    int n = k * L + L - 1 - l;
    for (int m = 0; m < M; m++)
      if (k - m >= 0)
        for (int j = 0; j < L; j++)
          if (n - m * L - j >= 0)
            acc += longint'(fir_pkg::rom_coef(rf[k - m], m * L + j)) * rxh[n - m * L - j];
    return acc;
  endfunction

  function automatic longint f_ref(input int k, input int l);
    longint acc = 0;
    int n = k * L + L - 1 - l;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) acc += longint'(fir_pkg::FIXED_H[i]) * fxh[n - i];
    return acc;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock cycle for both filters; nsel is driven after the edge.
  task automatic step(input logic rv, input logic fv, input int nsel);
    longint e;
    r_blk_valid = rv;
    f_blk_valid = fv;
    if (rv) begin
      for (int l = 0; l < L; l++) rxh[rn * L + L - 1 - l] = int'(r_x[l]);
      rf[rn] = sel_held;
    end
    if (fv) for (int l = 0; l < L; l++) fxh[fn * L + L - 1 - l] = int'(f_x[l]);
    @(negedge clk);
    sel_held = int'(r_sel);
    checks += 2;
    if (r_out_valid !== rv) begin failures++; $display("r_out_valid wrong"); end
    if (f_out_valid !== fv) begin failures++; $display("f_out_valid wrong"); end
    if (rv) begin
      for (int l = 0; l < L; l++) begin
        e = r_ref(rn, l);
        if (e > 32767 || e < -32768) wraps++;
        checks++;
        if (r_y[l] !== BA'(e)) begin
          failures++;
          $display("rfir blk %0d l=%0d got %0d exp %0d", rn, l, r_y[l], BA'(e));
        end
      end
      if (rn > 0 && rf[rn] != rf[rn - 1]) straddles++;
      rn++;
    end
    if (fv) begin
      for (int l = 0; l < L; l++) begin
        e = f_ref(fn, l);
        if (e > 32767 || e < -32768) wraps++;
        checks++;
        if (f_y[l] !== BA'(e)) begin
          failures++;
          $display("mcm_fir blk %0d l=%0d got %0d exp %0d", fn, l, f_y[l], BA'(e));
        end
      end
      fn++;
    end
    if (nsel != int'(r_sel)) switches++;
    r_sel = $clog2(P)'(nsel);
  endtask

  task automatic do_reset();
    rst = 1'b1;
    r_blk_valid = 1'b0;
    f_blk_valid = 1'b0;
    @(negedge clk);
    sel_held = int'(r_sel);
    rst = 1'b0;
    rn = 0;
    fn = 0;
    resets++;
  endtask

  function automatic logic signed [B-1:0] stim(input int k, input int l);
    // every seventh block is full scale with alternating signs
    if (k % 7 == 3) return (l % 2 == 0) ? 8'sd127 : -8'sd128;
    return B'($urandom);
  endfunction

  initial begin
    int total;
    r_sel = '0;
    sel_held = 0;
    for (int l = 0; l < L; l++) begin r_x[l] = '0; f_x[l] = '0; end
    do_reset();
    // impulses: fixed filter once, reconfigurable filter for each p
    for (int p = 0; p < P; p++) begin
      step(1'b0, 1'b0, p);
      step(1'b0, 1'b0, p);
      for (int k = 0; k < 2 * M + 1; k++) begin
        for (int l = 0; l < L; l++) begin
          r_x[l] = (k == M && l == L - 1) ? 8'sd1 : 8'sd0;
          f_x[l] = r_x[l];
        end
        step(1'b1, 1'b1, p);
        if (k >= M)
          for (int l = 0; l < L; l++) begin
            int tap;
            tap = (k - M) * L + L - 1 - l;
            checks += 2;
            if (r_y[l] !== ((tap < N) ? BA'(fir_pkg::rom_coef(p, tap)) : '0)) begin
              failures++;
              $display("impulse filter %0d tap %0d got %0d", p, tap, r_y[l]);
            end
            if (f_y[l] !== ((tap < N) ? BA'(fir_pkg::FIXED_H[tap]) : '0)) begin
              failures++;
              $display("fixed impulse tap %0d got %0d", tap, f_y[l]);
            end
          end
      end
    end
    // random traffic, with one reset in the middle
    total = 0;
    while (total < NBLK - 100) begin
      logic rv, fv;
      int ns;
      if (total == NBLK / 2) begin
        do_reset();
        total++;
        continue;
      end
      rv = ($urandom_range(0, 6) != 0);
      fv = ($urandom_range(0, 4) != 0);
      if (!rv) r_idles++;
      if (!fv) f_idles++;
      for (int l = 0; l < L; l++) begin
        r_x[l] = stim(rn, l);
        f_x[l] = stim(fn, l);
      end
      ns = ($urandom_range(0, 11) == 0) ? $urandom_range(0, P - 1) : int'(r_sel);
      step(rv, fv, ns);
      total++;
    end
    $display("fir_top: %0d filter switches, %0d blocks across a switch, %0d/%0d idle cycles, %0d wrapped outputs, %0d resets",
             switches, straddles, r_idles, f_idles, wraps, resets);
    if (switches == 0)  begin failures++; $display("no filter switch happened"); end
    if (straddles == 0) begin failures++; $display("no block straddled a switch"); end
    if (r_idles == 0 || f_idles == 0) begin failures++; $display("no idle cycle"); end
    if (wraps == 0)     begin failures++; $display("no wrap-around"); end
    if (resets < 2)     begin failures++; $display("no mid-stream reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
