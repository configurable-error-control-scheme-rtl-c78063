// error_detection - error detection stage of both decoders.
//
// Raises the Error flag when the block is enabled and the syndrome is not all
// zeros. The receiving switch or network interface can use the flag to ask for
// a retransmission or to drop the flit. Combinational.
module error_detection
  import ecc_pkg::*;
#(
  parameter code_e CODE = CODE_HSIAO,
  localparam int   M    = check_bits(CODE)
) (
  input  logic [M-1:0] s,
  input  logic         en,
  output logic         error
);
  assign error = en && (s != '0);
endmodule
