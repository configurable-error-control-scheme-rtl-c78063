// tb_check_bit_gen - self-checking test of the encoder for all three codes.
//
// Random data words are encoded and compared bit for bit with the reference
// encoder. Once per code the matrix the encoder implements (read back by
// encoding unit vectors) is checked for the code property it must have:
// distinct non-zero columns (Hamming), distinct odd-weight columns (Hsiao),
// distinct syndromes for every single-symbol error (S2SC).
module tb_check_bit_gen;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0][31:0] din;
  logic [2:0][38:0] wout;

  for (genvar g = 0; g < 3; g++) begin : g_code
    localparam code_e C = code_e'(g);
    localparam int    NN = code_len(C);
    logic [NN-1:0] w;
    check_bit_gen #(.CODE(C)) dut (.din (din[g]), .wout (w));
    assign wout[g] = 39'(w);
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
    logic [6:0] cols [39];
    logic [6:0] syns [$];
    logic [6:0] sy;
    code_e c;
    for (int it = 0; it < 2000; it++) begin
      for (int g = 0; g < 3; g++) din[g] = (it < 32) ? (32'(1) << it) : $urandom;
      #1;
      for (int g = 0; g < 3; g++) begin
        c = code_e'(g);
        check(wout[g] == ref_enc(c, din[g]),
              $sformatf("code %0d din %h got %h exp %h", g, din[g], wout[g], ref_enc(c, din[g])));
      end
    end
    // structural property of the implemented matrix
    for (int g = 0; g < 3; g++) begin
      c = code_e'(g);
      for (int j = 0; j < 32; j++) begin
        din[g] = 32'(1) << j;
        #1;
        cols[j] = 7'(wout[g] >> 32);
      end
      for (int j = 32; j < ref_n(c); j++) cols[j] = 7'(1) << (j - 32);
      syns.delete();
      if (c == CODE_S2SC) begin
        for (int s = 0; s < 19; s++) begin
          syns.push_back(cols[2*s]);
          syns.push_back(cols[2*s+1]);
          syns.push_back(cols[2*s] ^ cols[2*s+1]);
        end
      end else begin
        for (int j = 0; j < ref_n(c); j++) begin
          syns.push_back(cols[j]);
          if (c == CODE_HSIAO) check($countones(cols[j]) % 2 == 1, "Hsiao odd column");
        end
      end
      for (int a = 0; a < syns.size(); a++) begin
        sy = syns[a];
        check(sy != 0, $sformatf("code %0d zero syndrome %0d", g, a));
        for (int b = a + 1; b < syns.size(); b++)
          if (syns[b] == sy) check(0, $sformatf("code %0d repeated syndrome %0d %0d", g, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
