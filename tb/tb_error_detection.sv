// tb_error_detection - self-checking test of the error detection stage.
//
// Applies the zero syndrome, every single-bit syndrome and random syndromes
// with en high and low; Error must be set exactly for an enabled non-zero
// syndrome.
module tb_error_detection;
  import ecc_pkg::*;

  int checks = 0, failures = 0;
  logic [6:0] s;
  logic       en, error;

  error_detection #(.CODE(CODE_HSIAO)) dut (.s (s), .en (en), .error (error));

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
    for (int it = 0; it < 600; it++) begin
      if (it < 8)       s = (it == 0) ? 7'd0 : 7'(1) << (it - 1);
      else if (it < 16) s = (it == 8) ? 7'd0 : 7'(1) << (it - 9);
      else              s = 7'($urandom);
      en = (it < 8) ? 1'b1 : (it < 16) ? 1'b0 : 1'($urandom);
      #1;
      check(error == (en && s != 0), $sformatf("s %b en %0d error %0d", s, en, error));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
