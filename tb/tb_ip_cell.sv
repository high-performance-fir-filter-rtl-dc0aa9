// tb_ip_cell: self-checking testbench of the inner-product cell.
// Applies random rows and weight vectors, plus the extreme values, and
// compares the result with a 64-bit dot product reduced modulo 2^16. Extra
// instances with L = 3, 5 and 8 exercise other carry-save reduction
// schedules on the same random operands.
module tb_ip_cell;
  localparam int L = 4, B = 8, BC = 8, BA = 16;
  logic signed [B-1:0]  row [L];
  logic signed [BC-1:0] w   [L];
  logic signed [BA-1:0] ip;
  int checks = 0, failures = 0;

  ip_cell #(.L(L), .B(B), .BC(BC), .BA(BA)) dut (.row(row), .w(w), .ip(ip));

  // other sizes: rows/weights are the first n entries of rw/ww
  logic signed [B-1:0]  rw [8];
  logic signed [BC-1:0] ww [8];
  logic signed [BA-1:0] ip3, ip5, ip8;
  ip_cell #(.L(3), .B(B), .BC(BC), .BA(BA)) dut3 (.row(rw[0:2]), .w(ww[0:2]), .ip(ip3));
  ip_cell #(.L(5), .B(B), .BC(BC), .BA(BA)) dut5 (.row(rw[0:4]), .w(ww[0:4]), .ip(ip5));
  ip_cell #(.L(8), .B(B), .BC(BC), .BA(BA)) dut8 (.row(rw),      .w(ww),      .ip(ip8));

  function automatic logic signed [BA-1:0] dot(input int n);
    longint acc = 0;
    for (int j = 0; j < n; j++) acc += longint'(rw[j]) * longint'(ww[j]);
    return BA'(acc);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    for (int t = 0; t < 2000; t++) begin
      for (int j = 0; j < L; j++) begin
        case (t)
          0: begin row[j] = -128; w[j] = -128; end
          1: begin row[j] = 127;  w[j] = -128; end
          2: begin row[j] = -1;   w[j] = 1;    end
          default: begin row[j] = B'($urandom); w[j] = BC'($urandom); end
        endcase
      end
      for (int j = 0; j < 8; j++) begin rw[j] = B'($urandom); ww[j] = BC'($urandom); end
      #1;
      acc = 0;
      for (int j = 0; j < L; j++) acc += longint'(row[j]) * longint'(w[j]);
      checks++;
      if (ip !== BA'(acc)) begin
        failures++;
        $display("ip_cell mismatch t=%0d got %0d exp %0d", t, ip, BA'(acc));
      end
      checks += 3;
      if (ip3 !== dot(3)) begin failures++; $display("L=3 mismatch"); end
      if (ip5 !== dot(5)) begin failures++; $display("L=5 mismatch"); end
      if (ip8 !== dot(8)) begin failures++; $display("L=8 mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
