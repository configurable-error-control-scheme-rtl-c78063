// ec_mode_ctrl - derives the decoder control signals from the error control
// policy and the type of the flit being decoded.
//
// The five policies give header and payload flits each a treatment:
//   I   header cor. s-s, payload cor. s-s
//   II  header cor. s-s, payload det. s-s
//   III header cor. s-s, payload det. e-e
//   IV  header det. s-s, payload det. s-s
//   V   header det. s-s, payload det. e-e
// cor_det_n = 1 selects correction, ss_ee_n = 1 switch-to-switch checking.
// An undefined policy code is treated as policy I (this design's choice).
// Combinational.
module ec_mode_ctrl
  import ecc_pkg::*;
(
  input  policy_e policy,
  input  logic    is_head,
  output logic    cor_det_n,
  output logic    ss_ee_n
);
  always_comb begin
    unique case (policy)
      POL_II:  begin cor_det_n = is_head; ss_ee_n = 1'b1;    end
      POL_III: begin cor_det_n = is_head; ss_ee_n = is_head; end
      POL_IV:  begin cor_det_n = 1'b0;    ss_ee_n = 1'b1;    end
      POL_V:   begin cor_det_n = 1'b0;    ss_ee_n = is_head; end
      default: begin cor_det_n = 1'b1;    ss_ee_n = 1'b1;    end
    endcase
  end
endmodule
