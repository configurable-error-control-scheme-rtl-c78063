// ecc_pkg - shared types, constants and code construction for the configurable
// link error control scheme.
//
// Three linear codes protect a k = 32 bit flit word: a (38,32) single error
// correcting Hamming code, a (39,32) SEC/DED Hsiao code and a (38,32) single
// symbol error correcting code over 2-bit symbols (S2SC). The code lengths are
// those evaluated for the scheme; the particular parity-check matrices are this
// design's own construction:
//   * Hamming: data bit j gets the j-th 6-bit value of weight >= 2 in
//     increasing order; check bit i gets the unit vector e_i.
//   * Hsiao:   data bit j gets the j-th 7-bit value of weight 3 in increasing
//     order (odd-weight columns); check bit i gets e_i.
//   * S2SC:    a (19,16) Hamming code over GF(4), alpha^2 = alpha + 1. Data
//     symbol j gets the j-th normalised column of GF(4)^3 that is not a unit
//     vector; check symbol r gets e_r. Bit 0 of a symbol stands for 1 and
//     bit 1 for alpha, so the binary column of bit 1 is alpha times the symbol
//     column.
// A codeword is laid out as {check bits, data bits}: data in [K-1:0], check
// bits in [N-1:K]. Every check-bit column is a unit vector, so the encoder's
// check bits equal the syndrome contribution of the data bits.
package ecc_pkg;

  localparam int K     = 32;   // information bits per flit word
  localparam int MMAX  = 7;    // largest number of check bits (Hsiao)
  localparam int NMAX  = K + MMAX;

  typedef enum logic [1:0] {
    CODE_HAMMING = 2'd0,
    CODE_HSIAO   = 2'd1,
    CODE_S2SC    = 2'd2
  } code_e;

  // Five error control policies: header / payload treatment.
  typedef enum logic [2:0] {
    POL_I   = 3'd1,  // header cor. s-s,  payload cor. s-s
    POL_II  = 3'd2,  // header cor. s-s,  payload det. s-s
    POL_III = 3'd3,  // header cor. s-s,  payload det. e-e
    POL_IV  = 3'd4,  // header det. s-s,  payload det. s-s
    POL_V   = 3'd5   // header det. s-s,  payload det. e-e
  } policy_e;

  // Router structures.
  typedef enum logic [1:0] {
    ARCH_EE    = 2'd0,  // end-to-end only: encoder from NI, decoder to NI
    ARCH_SS_LA = 2'd1,  // switch-to-switch, low area: dec at inputs, enc at outputs
    ARCH_SS_HP = 2'd2   // switch-to-switch, high performance: dec/enc at inputs
  } arch_e;

  // Router ports, in Spidergon naming.
  localparam int NPORT  = 4;
  localparam int P_R    = 0;   // right (clockwise neighbour)
  localparam int P_L    = 1;   // left (counter-clockwise neighbour)
  localparam int P_A    = 2;   // across
  localparam int P_NI   = 3;   // network interface
  localparam int NVC    = 2;   // virtual channels per channel

  // Side-band bits that travel with every flit word.
  typedef struct packed {
    logic head;   // first flit of a packet, carries the destination
    logic tail;   // last flit of a packet
    logic vc;     // virtual channel
  } flit_meta_t;

  typedef logic [NMAX-1:0][MMAX-1:0] hmat_t;

  function automatic int check_bits(code_e c);
    case (c)
      CODE_HSIAO: return 7;
      default:    return 6;
    endcase
  endfunction

  function automatic int code_len(code_e c);
    return K + check_bits(c);
  endfunction

  // Bits per correctable symbol.
  function automatic int sym_bits(code_e c);
    return (c == CODE_S2SC) ? 2 : 1;
  endfunction

  function automatic logic [1:0] gf4_mul_alpha(logic [1:0] a);
    // (a0 + a1*alpha) * alpha = a1 + (a0 ^ a1) * alpha
    return {a[0] ^ a[1], a[1]};
  endfunction

  function automatic logic [1:0] gf4_mul(logic [1:0] a, logic [1:0] b);
    logic [1:0] r;
    r = 2'b00;
    if (b[0]) r = r ^ a;
    if (b[1]) r = r ^ gf4_mul_alpha(a);
    return r;
  endfunction

  // Multiply each of the three GF(4) symbols of a syndrome by a.
  function automatic logic [5:0] gf4_vec_mul(logic [5:0] v, logic [1:0] a);
    logic [5:0] r;
    for (int i = 0; i < 3; i++) r[2*i +: 2] = gf4_mul(v[2*i +: 2], a);
    return r;
  endfunction

  // Parity-check matrix: column j is the syndrome of a one in codeword bit j.
  function automatic hmat_t gen_h(code_e c);
    hmat_t h;
    int    j;
    int    m;
    logic [5:0] col;
    h = '0;
    m = check_bits(c);
    j = 0;
    case (c)
      CODE_HAMMING, CODE_HSIAO: begin
        for (int v = 1; v < (1 << MMAX) && j < K; v++) begin
          if (v < (1 << m) &&
              ((c == CODE_HAMMING && $countones(v) >= 2) ||
               (c == CODE_HSIAO   && $countones(v) == 3))) begin
            h[j] = MMAX'(v);
            j++;
          end
        end
      end
      default: begin
        // Normalised GF(4)^3 columns (first non-zero symbol = 1), not unit.
        for (int v = 1; v < 64 && j < K; v++) begin
          col = 6'(v);
          if (col[5:4] == 2'b00 && col[3:2] == 2'b00) continue;        // unit e0 multiples
          if (col[1:0] == 2'b00 && col[5:4] == 2'b00) continue;        // e1 multiples
          if (col[1:0] == 2'b00 && col[3:2] == 2'b00) continue;        // e2 multiples
          if (col[1:0] != 2'b00) begin
            if (col[1:0] != 2'b01) continue;
          end else if (col[3:2] != 2'b00) begin
            if (col[3:2] != 2'b01) continue;
          end
          h[j]   = MMAX'(col);
          h[j+1] = MMAX'(gf4_vec_mul(col, 2'b10));
          j += 2;
        end
      end
    endcase
    for (int i = 0; i < m; i++) h[K+i] = MMAX'(1) << i;
    return h;
  endfunction

endpackage
