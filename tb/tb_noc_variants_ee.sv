// tb_noc_variants_ee - end-to-end runs of 8-node networks of end-to-end-only
// routers with the (38,32) Hamming, (39,32) Hsiao and (38,32) 2-bit symbol
// codes. Routers check nothing; the destination NI decoder must flag every
// flit whose codeword was hit on any link (see tb_noc_run).
module tb_noc_variants_ee;
  import ecc_pkg::*;

  localparam int NRUN = 3;

  int c [NRUN];
  int f [NRUN];
  bit [NRUN-1:0] d;


  tb_noc_run #(.ARCH (ARCH_EE),    .CODE (CODE_HAMMING)) u_ee_ham (.checks (c[0]), .failures (f[0]), .done (d[0]));
  tb_noc_run #(.ARCH (ARCH_EE),    .CODE (CODE_HSIAO))   u_ee_hsi (.checks (c[1]), .failures (f[1]), .done (d[1]));
  tb_noc_run #(.ARCH (ARCH_EE),    .CODE (CODE_S2SC))    u_ee_s2s (.checks (c[2]), .failures (f[2]), .done (d[2]));

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
