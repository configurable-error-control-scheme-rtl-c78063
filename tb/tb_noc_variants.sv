// tb_noc_variants - end-to-end runs of the switch-to-switch router structures
// with the codes the default-size test does not cover, each on an 8-node
// Spidergon: low-area routers with the (38,32) Hamming, (39,32) Hsiao and
// (38,32) 2-bit symbol codes, and high-performance routers with the Hamming
// and symbol codes (high-performance with Hsiao is the default network, run by
// tb_noc_ecc_top; end-to-end-only routers are run by tb_noc_variants_ee).
// Each run goes through all five policies with error injection and a full
// scoreboard (see tb_noc_run).
module tb_noc_variants;
  import ecc_pkg::*;

  localparam int NRUN = 5;

  int c [NRUN];
  int f [NRUN];
  bit [NRUN-1:0] d;

  tb_noc_run #(.ARCH (ARCH_SS_LA), .CODE (CODE_HAMMING)) u_la_ham (.checks (c[0]), .failures (f[0]), .done (d[0]));
  tb_noc_run #(.ARCH (ARCH_SS_LA), .CODE (CODE_HSIAO))   u_la_hsi (.checks (c[1]), .failures (f[1]), .done (d[1]));
  tb_noc_run #(.ARCH (ARCH_SS_LA), .CODE (CODE_S2SC))    u_la_s2s (.checks (c[2]), .failures (f[2]), .done (d[2]));
  tb_noc_run #(.ARCH (ARCH_SS_HP), .CODE (CODE_HAMMING)) u_hp_ham (.checks (c[3]), .failures (f[3]), .done (d[3]));
  tb_noc_run #(.ARCH (ARCH_SS_HP), .CODE (CODE_S2SC))    u_hp_s2s (.checks (c[4]), .failures (f[4]), .done (d[4]));

  function automatic int total(int a [NRUN]);
    int t = 0;
    foreach (a[i]) t += a[i];
    return t;
  endfunction

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    wait (&d);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
