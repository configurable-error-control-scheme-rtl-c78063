// check_bit_gen - encoder (check bit generator) of the link error control scheme.
//
// Takes a k-bit flit word din and forms the n = k + m bit codeword
// wout = {c, din}, where the m check bits c are the XOR of the parity-check
// matrix columns of the data bits that are set. It is purely combinational;
// placed in front of a queue or link register it adds one encoder delay.
// The same encoder serves the end-to-end and the switch-to-switch policies.
// The code (Hamming, Hsiao or 2-bit symbol code) is chosen by CODE; the
// matrices are built in ecc_pkg and are this design's own.
module check_bit_gen
  import ecc_pkg::*;
#(
  parameter code_e CODE = CODE_HSIAO,
  localparam int   M    = check_bits(CODE),
  localparam int   N    = K + M
) (
  input  logic [K-1:0] din,
  output logic [N-1:0] wout
);
  localparam hmat_t H = gen_h(CODE);

  logic [M-1:0] c;

  always_comb begin
    c = '0;
    for (int j = 0; j < K; j++)
      if (din[j]) c = c ^ H[j][M-1:0];
  end

  assign wout = {c, din};
endmodule
