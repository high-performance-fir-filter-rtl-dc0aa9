// tb_ipu: self-checking testbench of the inner-product unit.
// Random L x L matrices and weight vectors; each of the L outputs must be
// the matrix-vector product row, computed here in 64 bits, modulo 2^16.
module tb_ipu;
  localparam int L = 4, B = 8, BC = 8, BA = 16;
  logic signed [B-1:0]  s [L][L];
  logic signed [BC-1:0] w [L];
  logic signed [BA-1:0] r [L];
  int checks = 0, failures = 0;

  ipu #(.L(L), .B(B), .BC(BC), .BA(BA)) dut (.s(s), .w(w), .r(r));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    for (int t = 0; t < 1000; t++) begin
      for (int j = 0; j < L; j++) begin
        w[j] = BC'($urandom);
        for (int l = 0; l < L; l++) s[l][j] = B'($urandom);
      end
      #1;
      for (int l = 0; l < L; l++) begin
        acc = 0;
        for (int j = 0; j < L; j++) acc += longint'(s[l][j]) * longint'(w[j]);
        checks++;
        if (r[l] !== BA'(acc)) begin
          failures++;
          $display("ipu mismatch t=%0d l=%0d got %0d exp %0d", t, l, r[l], BA'(acc));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
