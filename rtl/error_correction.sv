// error_correction - correction stage of the router decoder.
//
// Corrects the received word by XOR-ing it with the error vector from the
// syndrome decoder. With en low the word passes unchanged. Combinational.
module error_correction
  import ecc_pkg::*;
#(
  parameter code_e CODE = CODE_HSIAO,
  localparam int   N    = code_len(CODE)
) (
  input  logic [N-1:0] win,
  input  logic [N-1:0] e,
  input  logic         en,
  output logic [N-1:0] wcor
);
  assign wcor = en ? (win ^ e) : win;
endmodule
