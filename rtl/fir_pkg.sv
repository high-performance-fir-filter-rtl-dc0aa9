// fir_pkg: sizes, coefficient tables and elaboration-time helpers shared by the
// block transpose-form FIR filters.
//
// Default sizes: block size L = 4 and filter length N = 16 (so M = N/L = 4
// short weight vectors), 8-bit samples (B), 8-bit coefficients (BC) and
// 16-bit (B + BC) partial sums and outputs (BA). Samples, coefficients and
// sums are two's complement; sums wrap modulo 2^BA.
//
// rom_coef() defines the contents of the coefficient ROMs of the
// reconfigurable filter. Filter 0 begins with the coefficients
// 32, 40, -109, 83, 67; the remaining entries and filters 1..3 are this
// design's own example set:
//   filter 0, n >= 5 : ((37 n) mod 128) - 64
//   filter 1         : 8 * (n + 1) for n < 8, 8 * (16 - n) after (smoothing)
//   filter 2         : (-1)^n * 4 * (16 - n)                 (high-pass)
//   filter 3         : n for n < 6, else 0   (0, 1, 2, 3, 4, 5: a constant
//                      input of 1 settles at an output of 15)
//   filter p >= 4    : ((29 p + 11 n) mod 255) - 127
// FIXED_H is the default coefficient set of the fixed-coefficient filter: a
// symmetric 15-tap example set, padded with a zero to N = 16. Its
// coefficients sum to 10, so a constant input of 1 settles at an output
// of 10.
package fir_pkg;

  localparam int L_DEF  = 4;   // block size
  localparam int N_DEF  = 16;  // filter length
  localparam int B_DEF  = 8;   // sample width
  localparam int BC_DEF = 8;   // coefficient width
  localparam int BA_DEF = 16;  // inner-product / output width (B + BC)
  localparam int P_DEF  = 4;   // number of filters held by the CSU

  localparam int FIXED_H [16] = '{3, -5, -7, 2, 11, -13, -19, 66,
                                  -19, -13, 11, 2, -7, -5, 3, 0};

  // Coefficient n of channel filter p in the reconfigurable filter's ROMs.
  function automatic int rom_coef(input int p, input int n);
    int v;
    case (p)
      0: begin
        case (n)
          0: v = 32;
          1: v = 40;
          2: v = -109;
          3: v = 83;
          4: v = 67;
          default: v = ((37 * n) % 128) - 64;
        endcase
      end
      1: v = (n < 8) ? 8 * (n + 1) : 8 * (16 - n);
      2: v = ((n % 2) == 1) ? -4 * (16 - n) : 4 * (16 - n);
      3: v = (n < 6) ? n : 0;
      default: v = ((29 * p + 11 * n) % 255) - 127;
    endcase
    return v;
  endfunction

  // Canonical signed digit recoding of a constant. csd_pos has a 1 where the
  // digit is +1, csd_neg where it is -1; c = sum(pos_i 2^i) - sum(neg_i 2^i).
  function automatic logic [31:0] csd_pos(input int c);
    logic [31:0] pm;
    longint      v;
    pm = '0;
    v  = longint'(c);
    for (int i = 0; i < 32; i++) begin
      if ((v & 1) != 0) begin
        if ((v & 3) == 1) begin
          pm[i] = 1'b1;
          v     = v - 1;
        end else begin
          v = v + 1;
        end
      end
      v = v >>> 1;
    end
    return pm;
  endfunction

  function automatic logic [31:0] csd_neg(input int c);
    logic [31:0] nm;
    longint      v;
    nm = '0;
    v  = longint'(c);
    for (int i = 0; i < 32; i++) begin
      if ((v & 1) != 0) begin
        if ((v & 3) == 3) begin
          nm[i] = 1'b1;
          v     = v + 1;
        end else begin
          v = v - 1;
        end
      end
      v = v >>> 1;
    end
    return nm;
  endfunction

  // Coefficient groups of Table-I style MCM: sample x(kL-j), 0 <= j <= 2L-2,
  // is multiplied by the groups g = g_lo(j)..g_hi(j), group g being
  // {h(g), h(g+L), ..., h(g+(M-1)L)}.
  function automatic int g_lo(input int j, input int l);
    return (j - l + 1 > 0) ? j - l + 1 : 0;
  endfunction

  function automatic int g_hi(input int j, input int l);
    return (j < l - 1) ? j : l - 1;
  endfunction

  function automatic int n_groups(input int j, input int l);
    return g_hi(j, l) - g_lo(j, l) + 1;
  endfunction

endpackage
