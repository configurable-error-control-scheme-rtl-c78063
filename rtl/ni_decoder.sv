// ni_decoder - detection-only decoder on the channel to the network interface.
//
// Used for the end-to-end part of a policy. The data bits of the received
// codeword pass straight through as din; the syndrome generator and error
// detection stage are enabled only while ss_ee_n = 0 (end-to-end checking)
// and then raise error for a non-zero syndrome, so the NI can request a
// retransmission of the packet. There is no correction path. Combinational.
module ni_decoder
  import ecc_pkg::*;
#(
  parameter code_e CODE = CODE_HSIAO,
  localparam int   M    = check_bits(CODE),
  localparam int   N    = K + M
) (
  input  logic [N-1:0] w,
  input  logic         ss_ee_n,
  output logic [K-1:0] din,
  output logic         error
);
  logic [M-1:0] s;

  syndrome_gen #(.CODE(CODE)) u_sgen (
    .win (w), .en (!ss_ee_n), .s (s)
  );

  error_detection #(.CODE(CODE)) u_det (
    .s (s), .en (!ss_ee_n), .error (error)
  );

  assign din = w[K-1:0];
endmodule
