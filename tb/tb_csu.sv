// tb_csu: self-checking testbench of the coefficient selection unit.
// Changes the filter select at random and checks, one cycle later, that
// every weight-vector entry c[m][j] equals coefficient mL+j of the selected
// filter; also checks the five leading coefficients of filter 0 literally.
module tb_csu;
  localparam int L = 4, N = 16, BC = 8, P = 4, M = N / L;
  logic clk = 1'b0;
  logic [$clog2(P)-1:0] sel;
  logic signed [BC-1:0] c [M][L];
  int checks = 0, failures = 0;
  int switches = 0;

  csu #(.L(L), .N(N), .BC(BC), .P(P)) dut (.clk(clk), .sel(sel), .c(c));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp0 [5] = '{32, 40, -109, 83, 67};
    logic [$clog2(P)-1:0] prev;
    sel = '0;
    @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      prev = sel;
      sel = $clog2(P)'($urandom_range(0, P - 1));
      if (sel != prev) switches++;
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        checks++;
        if (c[n / L][n % L] !== BC'(fir_pkg::rom_coef(int'(sel), n))) begin
          failures++;
          $display("csu mismatch sel=%0d n=%0d got %0d", sel, n, c[n / L][n % L]);
        end
      end
      if (sel == 0) begin
        for (int n = 0; n < 5; n++) begin
          checks++;
          if (c[0][n % L] !== BC'(exp0[n]) && n < L) failures++;
          if (n == L && c[1][0] !== BC'(exp0[n])) failures++;
        end
      end
    end
    if (switches == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
