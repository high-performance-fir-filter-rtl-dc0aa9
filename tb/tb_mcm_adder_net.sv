// tb_mcm_adder_net: self-checking testbench of the MCM adder network.
// Drives random products and checks r[m][l] = sum_g prod[l+g][g][m]
// (modulo 2^16), i.e. that every inner product takes the right product
// from the right sample's MCM block.
module tb_mcm_adder_net;
  localparam int L = 4, N = 16, BA = 16, M = N / L;
  logic signed [BA-1:0] prod [2*L-1][L][M];
  logic signed [BA-1:0] r    [M][L];
  int checks = 0, failures = 0;

  mcm_adder_net #(.L(L), .N(N), .BA(BA)) dut (.prod(prod), .r(r));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [BA-1:0] e;
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < 2 * L - 1; j++)
        for (int g = 0; g < L; g++)
          for (int m = 0; m < M; m++) prod[j][g][m] = BA'($urandom);
      #1;
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++) begin
          e = '0;
          for (int g = 0; g < L; g++) e += prod[l + g][g][m];
          checks++;
          if (r[m][l] !== e) begin
            failures++;
            $display("net mismatch m=%0d l=%0d got %0d exp %0d", m, l, r[m][l], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
