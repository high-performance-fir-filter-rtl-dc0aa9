// tb_mcm_block: self-checking testbench of the MCM block.
// Instantiates the MCM block of every sample position J = 0..2L-2 of the
// default L = 4, N = 16 fixed filter, applies all 256 sample values and
// compares every product with x * h(mL+g) computed by ordinary
// multiplication, modulo 2^16. A second instance with extreme constants
// (-128, 127, 85, -86, ...) exercises the signed-digit recoding.
module tb_mcm_block;
  localparam int L = 4, N = 16, B = 8, BA = 16, M = N / L;
  localparam int HX [N] = '{-128, 127, 85, -86, 1, -1, 0, 64,
                            -64, 99, -77, 3, 126, -127, 45, -3};
  logic signed [B-1:0] x;
  int checks = 0, failures = 0;

  for (genvar j = 0; j < 2 * L - 1; j++) begin : g_j
    localparam int G0 = fir_pkg::g_lo(j, L);
    localparam int NG = fir_pkg::n_groups(j, L);
    logic signed [BA-1:0] p  [NG][M];
    logic signed [BA-1:0] px [NG][M];
    mcm_block #(.L(L), .N(N), .B(B), .BA(BA), .J(j)) dut (.x(x), .prod(p));
    mcm_block #(.L(L), .N(N), .B(B), .BA(BA), .J(j), .H(HX)) dutx (.x(x), .prod(px));
    always @(x) begin
      #1;
      for (int q = 0; q < NG; q++)
        for (int m = 0; m < M; m++) begin
          checks += 2;
          if (p[q][m] !== BA'(int'(x) * fir_pkg::FIXED_H[m * L + G0 + q])) begin
            failures++;
            $display("mcm J=%0d g=%0d m=%0d x=%0d got %0d", j, G0 + q, m, x, p[q][m]);
          end
          if (px[q][m] !== BA'(int'(x) * HX[m * L + G0 + q])) begin
            failures++;
            $display("mcmx J=%0d g=%0d m=%0d x=%0d got %0d", j, G0 + q, m, x, px[q][m]);
          end
        end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    #5;
    for (int v = -128; v < 128; v++) begin
      x = B'(v);
      #5;
    end
    // group counts per sample follow the document's table: 1,2,3,4,3,2,1
    for (int j = 0; j < 2 * L - 1; j++) begin
      checks++;
      if (fir_pkg::n_groups(j, L) != ((j < L) ? j + 1 : 2 * L - 1 - j)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
