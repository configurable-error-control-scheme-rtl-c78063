// tb_error_correction - self-checking test of the correction stage.
//
// Random words and error vectors; the output must be their XOR when enabled
// and the unchanged word otherwise. Also corrects real single errors of a
// Hsiao codeword back to the codeword.
module tb_error_correction;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [38:0] win, e, wcor;
  logic        en;

  error_correction #(.CODE(CODE_HSIAO)) dut (.win (win), .e (e), .en (en), .wcor (wcor));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [38:0] cw;
    for (int it = 0; it < 2000; it++) begin
      if (it % 2 == 0) begin
        win = 39'({$urandom, $urandom});
        e   = 39'({$urandom, $urandom});
      end else begin
        cw  = ref_enc(CODE_HSIAO, $urandom);
        e   = ref_single_err(CODE_HSIAO);
        win = cw ^ e;
      end
      en = (it % 5) != 0;
      #1;
      check(wcor == (en ? (win ^ e) : win), $sformatf("win %h e %h en %0d got %h", win, e, en, wcor));
      if (it % 2 == 1 && en) check(wcor == cw, "codeword restored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
