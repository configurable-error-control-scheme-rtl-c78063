// tb_router_decoder - self-checking test of the configurable router decoder.
//
// For each code and each (COR/DET#, SS/EE#) setting, reference codewords are
// sent clean, with a correctable error and with a double bit error. Expected:
//   correction mode:   correctable errors repaired (check bits included),
//                      no Error flag;
//   detection, s-s:    word forwarded unchanged, Error = non-zero syndrome;
//   detection, e-e:    word forwarded unchanged, no Error flag.
// s_bypass must equal COR/DET# | SS/EE#.
module tb_router_decoder;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0][38:0] win, wout;
  logic [2:0]       cdn, sen, err, byp;

  for (genvar g = 0; g < 3; g++) begin : g_code
    localparam code_e C  = code_e'(g);
    localparam int    NN = code_len(C);
    logic [NN-1:0] wo;
    router_decoder #(.CODE(C)) dut (
      .win (win[g][NN-1:0]), .cor_det_n (cdn[g]), .ss_ee_n (sen[g]),
      .wout (wo), .error (err[g]), .s_bypass (byp[g])
    );
    assign wout[g] = 39'(wo);
  end

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
    code_e c;
    logic [2:0][38:0] cw;
    int kind;
    for (int it = 0; it < 3000; it++) begin
      kind = it % 3;            // 0 clean, 1 correctable, 2 double bit error
      for (int g = 0; g < 3; g++) begin
        c = code_e'(g);
        cw[g]  = ref_enc(c, $urandom);
        win[g] = cw[g] ^ ((kind == 1) ? ref_single_err(c) :
                          (kind == 2) ? ref_double_err(c) : '0);
        cdn[g] = 1'((it / 3) % 2);
        sen[g] = 1'((it / 6) % 2) | cdn[g];
      end
      #1;
      for (int g = 0; g < 3; g++) begin
        c = code_e'(g);
        check(byp[g] == (cdn[g] | sen[g]), "s_bypass");
        if (cdn[g]) begin
          if (kind != 2) check(wout[g] == cw[g], $sformatf("code %0d corrected %h exp %h", g, wout[g], cw[g]));
          else if (c == CODE_HSIAO) check(wout[g] == win[g], "Hsiao double error left alone");
          check(!err[g], "no flag in correction mode");
        end else begin
          check(wout[g] == win[g], "detection forwards original");
          check(err[g] == (sen[g] && kind != 0), $sformatf("code %0d kind %0d ss %0d err %0d", g, kind, sen[g], err[g]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
