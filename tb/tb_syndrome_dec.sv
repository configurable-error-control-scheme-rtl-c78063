// tb_syndrome_dec - self-checking test of the syndrome decoder, all codes.
//
// For every correctable error pattern (each single bit; each non-zero value of
// each 2-bit symbol for S2SC) the reference syndrome is applied and the error
// vector must equal the pattern. A zero syndrome, and for Hsiao the syndrome of
// any double error, must give a zero vector, as must en = 0.
module tb_syndrome_dec;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0][6:0]  s;
  logic [2:0]       en;
  logic [2:0][38:0] e;

  for (genvar g = 0; g < 3; g++) begin : g_code
    localparam code_e C  = code_e'(g);
    localparam int    NN = code_len(C);
    localparam int    MM = check_bits(C);
    logic [NN-1:0] eg;
    syndrome_dec #(.CODE(C)) dut (.s (s[g][MM-1:0]), .en (en[g]), .e (eg));
    assign e[g] = 39'(eg);
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

  task automatic apply(int g, logic [38:0] pat, bit ena, logic [38:0] exp);
    code_e c;
    c = code_e'(g);
    s[g]  = ref_syn(c, pat);
    en[g] = ena;
    #1;
    check(e[g] == exp, $sformatf("code %0d pat %h en %0d e %h exp %h", g, pat, ena, e[g], exp));
  endtask

  initial begin
    code_e c;
    logic [38:0] pat;
    s = '0; en = '0;
    for (int g = 0; g < 3; g++) begin
      c = code_e'(g);
      apply(g, '0, 1'b1, '0);
      if (c == CODE_S2SC) begin
        for (int sy = 0; sy < 19; sy++)
          for (int p = 1; p < 4; p++) begin
            pat = 39'(p) << (2 * sy);
            apply(g, pat, 1'b1, pat);
            apply(g, pat, 1'b0, '0);
          end
      end else begin
        for (int j = 0; j < ref_n(c); j++) begin
          pat = 39'(1) << j;
          apply(g, pat, 1'b1, pat);
          apply(g, pat, 1'b0, '0);
        end
      end
      if (c == CODE_HSIAO)
        for (int it = 0; it < 500; it++) apply(g, ref_double_err(c), 1'b1, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
