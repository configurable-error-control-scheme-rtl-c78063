// syndrome_gen - syndrome generator of the decoders.
//
// Computes the m-bit syndrome s of the received n-bit word win as the XOR of
// the parity-check columns of all set bits. An all-zero syndrome means no
// detectable error. When en is low the output is held at zero, which models
// disabling the block (the NI decoder disables it under switch-to-switch
// policies). Combinational.
module syndrome_gen
  import ecc_pkg::*;
#(
  parameter code_e CODE = CODE_HSIAO,
  localparam int   M    = check_bits(CODE),
  localparam int   N    = K + M
) (
  input  logic [N-1:0] win,
  input  logic         en,
  output logic [M-1:0] s
);
  localparam hmat_t H = gen_h(CODE);

  always_comb begin
    s = '0;
    for (int j = 0; j < N; j++)
      if (win[j]) s = s ^ H[j][M-1:0];
    if (!en) s = '0;
  end
endmodule
