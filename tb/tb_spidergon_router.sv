// tb_spidergon_router - self-checking test of one router (node 0 of 8,
// Hsiao code, high-performance switch-to-switch structure).
//
// 1. Zero-load latency: a flit from the NI appears on its output link three
//    cycles after the NI hand-shake; a flit from a link reaches the NI output
//    register four cycles after it was on the link.
// 2. Routing: packets from the NI to every destination leave on the port the
//    across-first rule gives (R for 1..2, L for 6..7, A for 3..5, NI for 0),
//    encoded with the reference encoder.
// 3. Links to NI: codewords arriving on R, L and A with a single-bit error are
//    corrected under policy I; under policy IV a check-bit error raises err_ss
//    and the flit is forwarded; under policy III a payload check-bit error
//    raises ni_out_error at the NI instead.
// 4. Credits: every flit accepted on a link returns one credit on its VC; with
//    no credits returned downstream, an output sends exactly DEPTH flits per VC
//    and then stalls until credits come back.
module tb_spidergon_router;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int NN = 39, DEPTH = 4;

  logic clk = 0, rst_n = 0;
  policy_e                 policy;
  logic       [2:0]        in_valid, out_valid;
  flit_meta_t [2:0]        in_meta, out_meta;
  logic       [2:0][NN-1:0] in_word, out_word;
  logic       [2:0][1:0]   in_credit, out_credit;
  logic                    ni_in_valid, ni_in_ready, ni_out_valid, ni_out_ready, ni_out_error;
  flit_meta_t              ni_in_meta, ni_out_meta;
  logic       [31:0]       ni_in_data, ni_out_data;
  logic       [2:0]        err_ss;

  spidergon_router #(.NODES (8), .NODE_ID (0), .DEPTH (DEPTH)) dut (
    .clk (clk), .rst_n (rst_n), .policy (policy),
    .in_valid (in_valid), .in_meta (in_meta), .in_word (in_word), .in_credit (in_credit),
    .out_valid (out_valid), .out_meta (out_meta), .out_word (out_word), .out_credit (out_credit),
    .ni_in_valid (ni_in_valid), .ni_in_ready (ni_in_ready), .ni_in_meta (ni_in_meta),
    .ni_in_data (ni_in_data), .ni_out_valid (ni_out_valid), .ni_out_ready (ni_out_ready),
    .ni_out_meta (ni_out_meta), .ni_out_data (ni_out_data), .ni_out_error (ni_out_error),
    .err_ss (err_ss)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int credits_back [3][2];
  int sent_out     [3][2];
  bit auto_credit = 1;
  bit manual_credit = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // downstream model: count flits per output VC, return credits if enabled
  always @(negedge clk) begin
    for (int p = 0; p < 3; p++) begin
      out_credit[p] = '0;
      if (out_valid[p]) begin
        sent_out[p][out_meta[p].vc]++;
        if (auto_credit) out_credit[p][out_meta[p].vc] = 1'b1;
      end
      if (!auto_credit && p == P_R) out_credit[p][0] = manual_credit;
      for (int v = 0; v < 2; v++) if (in_credit[p][v]) credits_back[p][v]++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_port(int dst);
    if (dst == 0) return P_NI;
    if (dst <= 2) return P_R;
    if (dst >= 6) return P_L;
    return P_A;
  endfunction

  // send one single-flit packet from the NI and find where it leaves
  task automatic ni_send(int dst, logic vc, output int port, output int lat);
    logic [31:0] d;
    d = {16'h0, 8'($urandom), 5'd0, 3'(dst)};
    @(negedge clk);
    ni_in_valid = 1; ni_in_meta = '{head: 1, tail: 1, vc: vc}; ni_in_data = d;
    @(negedge clk);
    ni_in_valid = 0;
    port = -1;
    lat  = 0;
    for (int c = 1; c < 10 && port < 0; c++) begin
      for (int p = 0; p < 3; p++)
        if (out_valid[p]) begin
          port = p; lat = c;
          check(out_word[p] == ref_enc(CODE_HSIAO, d), $sformatf("encoded word %h", out_word[p]));
          check(out_meta[p].vc == vc && out_meta[p].head && out_meta[p].tail, "meta");
        end
      if (ni_out_valid) begin
        port = P_NI; lat = c;
        check(ni_out_data == d, "NI loop data");
      end
      if (port < 0) @(negedge clk);
    end
  endtask

  // drive one flit on a link for one cycle; return what the NI output shows
  task automatic link_send(int p, flit_meta_t m, logic [NN-1:0] w, output bit err_flag);
    @(negedge clk);
    in_valid[p] = 1; in_meta[p] = m; in_word[p] = w;
    #1;
    err_flag = err_ss[p];
    check((err_ss & ~(3'b1 << p)) == 0, "no flag on idle inputs");
    @(negedge clk);
    in_valid[p] = 0;
  endtask

  task automatic ni_recv(output logic [31:0] d, output bit e, output int lat);
    lat = 0;
    while (!ni_out_valid && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    d = ni_out_data;
    e = ni_out_error;
    check(ni_out_valid, "NI output flit");
  endtask

  initial begin
    int port, lat;
    bit eflag, nerr;
    logic [31:0] d, rd;
    logic [NN-1:0] cw, pat;
    policy = POL_I;
    in_valid = '0; in_meta = '0; in_word = '0;
    ni_in_valid = 0; ni_in_meta = '0; ni_in_data = '0; ni_out_ready = 1;
    for (int p = 0; p < 3; p++) for (int v = 0; v < 2; v++) begin
      credits_back[p][v] = 0; sent_out[p][v] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1+2: routing and latency from the NI
    for (int dst = 0; dst < 8; dst++)
      for (int vc = 0; vc < 2; vc++) begin
        ni_send(dst, 1'(vc), port, lat);
        check(port == exp_port(dst), $sformatf("dst %0d left on port %0d", dst, port));
        check(lat == 3, $sformatf("NI-to-link latency %0d", lat));
        repeat (3) @(negedge clk);
      end

    // 3: flits from each link to the NI under policies I, IV and III
    for (int p = 0; p < 3; p++) begin
      // policy I, header + payload with single-bit errors anywhere
      policy = POL_I;
      d  = 32'h0000_0a00;                      // header to node 0
      cw = ref_enc(CODE_HSIAO, d);
      pat = '0; pat[$urandom_range(NN - 1)] = 1;
      link_send(p, '{head: 1, tail: 0, vc: 1'(p % 2)}, cw ^ pat, eflag);
      check(!eflag, "no flag in correction mode");
      ni_recv(rd, nerr, lat);
      check(lat == 3, $sformatf("link-to-NI latency %0d", lat + 1));
      check(rd == d && !nerr, "corrected header");
      @(negedge clk);
      d  = $urandom;
      cw = ref_enc(CODE_HSIAO, d);
      pat = '0; pat[$urandom_range(31)] = 1;
      link_send(p, '{head: 0, tail: 1, vc: 1'(p % 2)}, cw ^ pat, eflag);
      ni_recv(rd, nerr, lat);
      check(rd == d && !nerr, "corrected payload");
      @(negedge clk);

      // policy IV: detection s-s, check-bit error flagged, flit forwarded
      policy = POL_IV;
      d  = 32'h0000_0b00;
      cw = ref_enc(CODE_HSIAO, d);
      pat = '0; pat[$urandom_range(NN - 1, 32)] = 1;
      link_send(p, '{head: 1, tail: 0, vc: 0}, cw ^ pat, eflag);
      check(eflag, "s-s detection flag");
      ni_recv(rd, nerr, lat);
      check(rd == d && !nerr, "detected header forwarded");
      @(negedge clk);
      // policy III: payload checked end to end at the NI
      policy = POL_III;
      d  = $urandom;
      cw = ref_enc(CODE_HSIAO, d);
      pat = '0; pat[$urandom_range(NN - 1, 32)] = 1;
      link_send(p, '{head: 0, tail: 1, vc: 0}, cw ^ pat, eflag);
      check(!eflag, "no s-s flag for e-e payload");
      ni_recv(rd, nerr, lat);
      check(rd == d && nerr, "e-e detection flag at the NI");
      @(negedge clk);
    end
    repeat (5) @(negedge clk);
    for (int p = 0; p < 3; p++)
      check(credits_back[p][0] + credits_back[p][1] == 4,
            $sformatf("credits returned on port %0d: %0d", p, credits_back[p][0] + credits_back[p][1]));

    // 4: credit stall on output R, VC 0
    policy = POL_I;
    auto_credit = 0;
    sent_out[P_R][0] = 0;
    for (int k = 0; k <= 2 * DEPTH; k++) begin
      @(negedge clk);
      ni_in_valid = 1;
      ni_in_meta  = '{head: (k == 0), tail: (k == 2 * DEPTH), vc: 0};
      ni_in_data  = (k == 0) ? 32'h1 : $urandom;   // header to node 1, via R
      #1;
      check(ni_in_ready, "NI input accepts");
    end
    @(negedge clk);
    ni_in_valid = 0;
    repeat (20) @(negedge clk);
    check(sent_out[P_R][0] == DEPTH, $sformatf("sent %0d flits without credits", sent_out[P_R][0]));
    // return credits one at a time; the rest of the packet must follow
    for (int k = 0; k < 2 * DEPTH; k++) begin
      @(negedge clk);
      manual_credit = 1'b1;
      @(negedge clk);
      manual_credit = 1'b0;
      repeat (3) @(negedge clk);
    end
    check(sent_out[P_R][0] == 2 * DEPTH + 1, $sformatf("packet completed after credits: %0d", sent_out[P_R][0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
