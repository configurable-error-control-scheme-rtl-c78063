// ecc_ref_pkg - reference model of the three link codes for the testbenches.
//
// Rebuilds the parity-check matrices from their definition, written
// independently of the RTL package: GF(4) products come from a table, and
// columns are found by direct search. Codeword layout {check, data}.
package ecc_ref_pkg;
  import ecc_pkg::code_e;
  import ecc_pkg::CODE_HAMMING;
  import ecc_pkg::CODE_HSIAO;
  import ecc_pkg::CODE_S2SC;

  localparam int RK = 32;

  function automatic int ref_m(code_e c);
    return (c == CODE_HSIAO) ? 7 : 6;
  endfunction

  function automatic int ref_n(code_e c);
    return RK + ref_m(c);
  endfunction

  // alpha * x in GF(4), elements 0,1,alpha(=2),alpha^2(=3)
  function automatic int amul(int x);
    case (x)
      0: return 0;
      1: return 2;
      2: return 3;
      default: return 1;
    endcase
  endfunction

  function automatic logic [6:0] ref_col(code_e c, int j);
    int cnt;
    int x0, x1, x2, nz, first;
    if (j >= RK) return 7'(1) << (j - RK);
    cnt = 0;
    if (c == CODE_S2SC) begin
      for (int v = 1; v < 64; v++) begin
        x0 = v % 4; x1 = (v / 4) % 4; x2 = v / 16;
        nz = int'(x0 != 0) + int'(x1 != 0) + int'(x2 != 0);
        first = (x0 != 0) ? x0 : (x1 != 0) ? x1 : x2;
        if (nz >= 2 && first == 1) begin
          if (cnt == j / 2) begin
            if (j % 2 == 0) return 7'(v);
            else return 7'(amul(x0) + 4 * amul(x1) + 16 * amul(x2));
          end
          cnt++;
        end
      end
    end else begin
      for (int v = 1; v < 128; v++) begin
        nz = $countones(v);
        if ((c == CODE_HAMMING && v < 64 && nz > 1) || (c == CODE_HSIAO && nz == 3)) begin
          if (cnt == j) return 7'(v);
          cnt++;
        end
      end
    end
    return '0;
  endfunction

  function automatic logic [6:0] ref_syn(code_e c, logic [38:0] w);
    logic [6:0] s;
    s = '0;
    for (int j = 0; j < ref_n(c); j++) if (w[j]) s ^= ref_col(c, j);
    return s;
  endfunction

  function automatic logic [38:0] ref_enc(code_e c, logic [31:0] d);
    logic [6:0] s;
    s = ref_syn(c, {7'b0, d});
    return (39'(s) << RK) | 39'(d);
  endfunction

  // A random correctable error: one bit, or one aligned 2-bit symbol for S2SC.
  function automatic logic [38:0] ref_single_err(code_e c);
    int pos;
    logic [1:0] p;
    if (c == CODE_S2SC) begin
      pos = $urandom_range(18);
      p   = 2'($urandom_range(3, 1));
      return 39'(p) << (2 * pos);
    end
    pos = $urandom_range(ref_n(c) - 1);
    return 39'(1) << pos;
  endfunction

  // Two distinct random bit errors.
  function automatic logic [38:0] ref_double_err(code_e c);
    int a, b;
    a = $urandom_range(ref_n(c) - 1);
    do b = $urandom_range(ref_n(c) - 1); while (b == a);
    return (39'(1) << a) | (39'(1) << b);
  endfunction
endpackage
