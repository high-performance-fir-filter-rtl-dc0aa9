// tb_pau: self-checking testbench of the pipeline adder unit.
// Drives random partial blocks r_m with idle cycles and checks, each cycle,
// out_valid (one cycle after en) and y = r_0(k) + r_1(k-1) + ... +
// r_{M-1}(k-M+1) over valid blocks, from a history kept here (zero before
// the first block), modulo 2^16.
module tb_pau;
  localparam int L = 4, N = 16, BA = 16, M = N / L, NBLK = 400;
  logic clk = 1'b0;
  logic rst, en;
  logic signed [BA-1:0] r [M][L];
  logic signed [BA-1:0] y [L];
  logic out_valid;
  int checks = 0, failures = 0;
  int idles = 0;

  logic signed [BA-1:0] hist [NBLK + 1][M][L];
  logic signed [BA-1:0] expy [L];
  logic                 expv;

  pau #(.L(L), .N(N), .BA(BA)) dut (.clk(clk), .rst(rst), .en(en), .r(r), .y(y), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    rst = 1'b1; en = 1'b0;
    for (int m = 0; m < M; m++) for (int l = 0; l < L; l++) r[m][l] = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    k = 0; expv = 1'b0;
    while (k < NBLK) begin
      en = ($urandom_range(0, 3) != 0);
      for (int m = 0; m < M; m++) for (int l = 0; l < L; l++) r[m][l] = BA'($urandom);
      if (en) begin
        hist[k] = r;
        for (int l = 0; l < L; l++) begin
          expy[l] = '0;
          for (int m = 0; m < M; m++) if (k - m >= 0) expy[l] += hist[k - m][m][l];
        end
        k++;
      end else idles++;
      expv = en;
      @(negedge clk);
      checks++;
      if (out_valid !== expv) begin
        failures++;
        $display("pau out_valid wrong at block %0d", k);
      end
      if (expv) begin
        for (int l = 0; l < L; l++) begin
          checks++;
          if (y[l] !== expy[l]) begin
            failures++;
            $display("pau mismatch blk %0d l=%0d got %0d exp %0d", k - 1, l, y[l], expy[l]);
          end
        end
      end
    end
    if (idles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
