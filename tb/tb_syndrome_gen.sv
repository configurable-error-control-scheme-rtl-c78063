// tb_syndrome_gen - self-checking test of the syndrome generator, all codes.
//
// Random received words (clean codewords, codewords with random errors and
// random words) are compared with the reference syndrome; with en low the
// syndrome must be zero.
module tb_syndrome_gen;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0][38:0] win;
  logic [2:0]       en;
  logic [2:0][6:0]  s;

  for (genvar g = 0; g < 3; g++) begin : g_code
    localparam code_e C  = code_e'(g);
    localparam int    NN = code_len(C);
    localparam int    MM = check_bits(C);
    logic [MM-1:0] sg;
    syndrome_gen #(.CODE(C)) dut (.win (win[g][NN-1:0]), .en (en[g]), .s (sg));
    assign s[g] = 7'(sg);
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
    logic [38:0] mask;
    for (int it = 0; it < 3000; it++) begin
      for (int g = 0; g < 3; g++) begin
        c = code_e'(g);
        mask = (39'(1) << ref_n(c)) - 1;
        case (it % 3)
          0: win[g] = ref_enc(c, $urandom);
          1: win[g] = ref_enc(c, $urandom) ^ ref_single_err(c);
          default: win[g] = 39'({$urandom, $urandom}) & mask;
        endcase
        en[g] = (it % 7) != 0;
      end
      #1;
      for (int g = 0; g < 3; g++) begin
        c = code_e'(g);
        check(s[g] == (en[g] ? ref_syn(c, win[g]) : 7'd0),
              $sformatf("code %0d w %h s %h exp %h", g, win[g], s[g], ref_syn(c, win[g])));
        if (it % 3 == 0 && en[g]) check(s[g] == 0, "codeword has zero syndrome");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
