// tb_ru: self-checking testbench of the register unit.
// Streams random blocks (with idle cycles) into ru and checks every entry of
// the input matrix against a sample history kept by the testbench:
// s[l][j] must equal x(kL-l-j), with zero before the first sample. Also
// checks that an idle cycle (en low) leaves the held samples unchanged and
// that reset clears them.
module tb_ru;
  localparam int L = 4;
  localparam int B = 8;
  localparam int NBLK = 300;

  logic clk = 1'b0;
  logic rst, en;
  logic signed [B-1:0] x [L];
  logic signed [B-1:0] s [L][L];
  int checks = 0, failures = 0;
  int idles = 0;

  // hist[n] = x(n); index 0 is the first sample of the stream
  logic signed [B-1:0] hist [NBLK * L + 2 * L];
  int nsmp;

  ru #(.L(L), .B(B)) dut (.clk(clk), .rst(rst), .en(en), .x(x), .s(s));

  always #5 clk = ~clk;

  function automatic logic signed [B-1:0] xs(input int n);
    return (n < 0) ? '0 : hist[n];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    for (int l = 0; l < L; l++) x[l] = '0;
    nsmp = 0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < NBLK; ) begin
      en = ($urandom_range(0, 4) != 0);
      // block k holds x(kL)..x(kL+L-1); x[l] = x(kL + L-1 - l) in stream order
      for (int l = 0; l < L; l++) x[l] = B'($urandom);
      #1;
      if (en) begin
        for (int l = 0; l < L; l++) hist[nsmp + L - 1 - l] = x[l];
        for (int l = 0; l < L; l++)
          for (int j = 0; j < L; j++) begin
            checks++;
            if (s[l][j] !== xs(nsmp + L - 1 - l - j)) begin
              failures++;
              $display("ru mismatch blk %0d s[%0d][%0d]=%0d exp %0d", k, l, j, s[l][j], xs(nsmp + L - 1 - l - j));
            end
          end
        nsmp += L;
        k++;
      end else begin
        idles++;
        // registers must still hold the previous block's samples
        for (int i = 0; i < L - 1; i++) begin
          checks++;
          if (s[L - 1][i + 1] !== xs(nsmp - 1 - i)) failures++;
        end
      end
      @(negedge clk);
    end
    // reset clears the held samples
    rst = 1'b1; en = 1'b0;
    @(negedge clk);
    for (int j = 1; j < L; j++) begin
      checks++;
      if (s[L - 1][j] !== '0) failures++;
    end
    if (idles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
