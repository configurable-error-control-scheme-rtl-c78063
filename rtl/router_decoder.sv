// router_decoder - configurable decoder placed on each router input channel.
//
// The received codeword win feeds the syndrome generator. In correction mode
// (cor_det_n = 1) the syndrome decoder turns the syndrome into an error vector
// and the correction stage XORs it into the word; in detection mode
// (cor_det_n = 0) both are disabled and the error detection stage instead
// flags a non-zero syndrome. An output multiplexer, steered by
// s_bypass = cor_det_n | ss_ee_n, selects the correction path (s_bypass = 1)
// or the raw input word (s_bypass = 0). The whole codeword, check bits
// included, is output, so a high-performance router can forward it without
// re-encoding; a low-area router keeps only wout[K-1:0].
//
// Own choices: the Error flag is also gated by ss_ee_n, so a flit whose part
// of the packet is checked only end to end raises no flag in transit; the
// mux polarity follows the structure of the scheme's decoder drawing.
// Combinational.
module router_decoder
  import ecc_pkg::*;
#(
  parameter code_e CODE = CODE_HSIAO,
  localparam int   M    = check_bits(CODE),
  localparam int   N    = K + M
) (
  input  logic [N-1:0] win,
  input  logic         cor_det_n,  // 1: correction mode, 0: detection mode
  input  logic         ss_ee_n,    // 1: switch-to-switch, 0: end-to-end
  output logic [N-1:0] wout,
  output logic         error,
  output logic         s_bypass
);
  logic [M-1:0] s;
  logic [N-1:0] e;
  logic [N-1:0] wcor;

  syndrome_gen #(.CODE(CODE)) u_sgen (
    .win (win), .en (1'b1), .s (s)
  );

  syndrome_dec #(.CODE(CODE)) u_sdec (
    .s (s), .en (cor_det_n), .e (e)
  );

  error_correction #(.CODE(CODE)) u_corr (
    .win (win), .e (e), .en (cor_det_n), .wcor (wcor)
  );

  error_detection #(.CODE(CODE)) u_det (
    .s (s), .en (!cor_det_n && ss_ee_n), .error (error)
  );

  assign s_bypass = cor_det_n | ss_ee_n;
  assign wout     = s_bypass ? wcor : win;
endmodule
