// syndrome_dec - syndrome decoder of the router decoder.
//
// Maps a syndrome to the error vector e[n-1:0]: all zeros, except the bits
// of the single bit (Hamming, Hsiao) or single 2-bit symbol (S2SC) whose
// error would produce exactly this syndrome. The decoder compares s with the
// syndrome of every correctable error pattern; a syndrome that matches none
// (no error, or an uncorrectable one) gives e = 0. The vector covers the check
// bits too, so that a decoder that forwards the whole codeword also repairs
// its check bits. en low forces e = 0 (detection mode). Combinational.
module syndrome_dec
  import ecc_pkg::*;
#(
  parameter code_e CODE = CODE_HSIAO,
  localparam int   M    = check_bits(CODE),
  localparam int   N    = K + M
) (
  input  logic [M-1:0] s,
  input  logic         en,
  output logic [N-1:0] e
);
  localparam hmat_t H  = gen_h(CODE);
  localparam int    SB = sym_bits(CODE);
  localparam int    NS = N / SB;

  logic [M-1:0] syn;

  always_comb begin
    e = '0;
    for (int j = 0; j < NS; j++) begin
      for (int p = 1; p < (1 << SB); p++) begin
        syn = '0;
        for (int b = 0; b < SB; b++)
          if (p[b]) syn = syn ^ H[j*SB + b][M-1:0];
        if (en && s == syn) e[j*SB +: SB] = SB'(p);
      end
    end
  end
endmodule
