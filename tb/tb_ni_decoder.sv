// tb_ni_decoder - self-checking test of the detection-only NI decoder.
//
// Clean, single-error and double-error codewords of each code; the data bits
// must pass unchanged and Error must flag any error while SS/EE# = 0 and stay
// low while SS/EE# = 1.
module tb_ni_decoder;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0][38:0] w;
  logic [2:0]       sen, err;
  logic [2:0][31:0] din;

  for (genvar g = 0; g < 3; g++) begin : g_code
    localparam code_e C  = code_e'(g);
    localparam int    NN = code_len(C);
    ni_decoder #(.CODE(C)) dut (
      .w (w[g][NN-1:0]), .ss_ee_n (sen[g]), .din (din[g]), .error (err[g])
    );
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
    int kind;
    for (int it = 0; it < 3000; it++) begin
      kind = it % 3;
      for (int g = 0; g < 3; g++) begin
        c = code_e'(g);
        w[g] = ref_enc(c, $urandom) ^ ((kind == 1) ? ref_single_err(c) :
                                       (kind == 2) ? ref_double_err(c) : '0);
        sen[g] = 1'((it / 3) % 2);
      end
      #1;
      for (int g = 0; g < 3; g++) begin
        check(din[g] == w[g][31:0], "data passes");
        check(err[g] == (!sen[g] && kind != 0), $sformatf("code %0d kind %0d ss %0d err %0d", g, kind, sen[g], err[g]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
