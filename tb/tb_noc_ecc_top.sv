// tb_noc_ecc_top - end-to-end test of the Spidergon NoC at its default size
// (12 nodes, Hsiao (39,32) code, high-performance switch-to-switch routers).
//
// Runs the five error control policies one after the other (a mode switch
// between phases, with the network drained). In each phase every node sends
// packets (one header flit carrying {seq, src, dst}, then 1..4 payload flits
// with unique contents) to random destinations on random virtual channels,
// while the destination NIs apply random back-pressure. On every link that
// carries a flit, errors are injected at random through link_flip:
//   * flits the policy corrects get a single-bit error anywhere in the
//     codeword, and must arrive intact with no flag;
//   * flits checked switch-to-switch get a single check-bit error (so that
//     the data stays usable); the receiving router must raise err_ss for that
//     flit on this and every later hop;
//   * payload flits checked end-to-end get a check-bit error; routers must stay
//     silent and the destination NI must raise ni_out_error for exactly those
//     flits.
// Every delivered packet is compared with what was sent. The test counts
// each mechanism (corrections, s-s detections, e-e detections, NI stalls,
// injection stalls, both VCs, across links, policy switches) and fails if one
// never occurred.
module tb_noc_ecc_top;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int NODES = 12;
  localparam int NN    = 39;            // Hsiao code length, the default
  localparam int PKTS  = 8;             // packets per node per phase

  logic clk = 0, rst_n = 0;
  policy_e policy;
  logic       [NODES-1:0][2:0][NN-1:0] link_flip;
  logic       [NODES-1:0]              ni_in_valid, ni_in_ready;
  flit_meta_t [NODES-1:0]              ni_in_meta;
  logic       [NODES-1:0][31:0]        ni_in_data;
  logic       [NODES-1:0]              ni_out_valid, ni_out_ready, ni_out_error;
  flit_meta_t [NODES-1:0]              ni_out_meta;
  logic       [NODES-1:0][31:0]        ni_out_data;
  logic       [NODES-1:0][2:0]         err_ss;

  noc_ecc_top dut (
    .clk (clk), .rst_n (rst_n), .policy (policy), .link_flip (link_flip),
    .ni_in_valid (ni_in_valid), .ni_in_ready (ni_in_ready),
    .ni_in_meta (ni_in_meta), .ni_in_data (ni_in_data),
    .ni_out_valid (ni_out_valid), .ni_out_ready (ni_out_ready),
    .ni_out_meta (ni_out_meta), .ni_out_data (ni_out_data),
    .ni_out_error (ni_out_error), .err_ss (err_ss)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_corr = 0, n_det_ss = 0, n_det_ee = 0, n_ni_stall = 0, n_inj_stall = 0;
  int n_vc0 = 0, n_vc1 = 0, n_across = 0, n_switch = 0, n_pkts = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  typedef struct packed {
    flit_meta_t  meta;
    logic [31:0] data;
  } tflit_t;

  tflit_t      src_q   [NODES][$];
  logic [31:0] exp_pl  [logic [31:0]][$];     // header word -> payload words
  bit          chk_hit [logic [31:0]];        // flits given a check-bit error
  logic [31:0] cur_key [NODES];
  int          cur_idx [NODES];
  int          seq     [NODES];

  // {cor_det_n, ss_ee_n} of the policy table
  function automatic logic [1:0] mode(policy_e p, logic head);
    case (p)
      POL_I:   return 2'b11;
      POL_II:  return head ? 2'b11 : 2'b01;
      POL_III: return head ? 2'b11 : 2'b00;
      POL_IV:  return 2'b01;
      default: return head ? 2'b01 : 2'b00;
    endcase
  endfunction

  function automatic int dest_node(int i, int p);
    case (p)
      P_R:     return (i + 1) % NODES;
      P_L:     return (i + NODES - 1) % NODES;
      default: return (i + NODES / 2) % NODES;
    endcase
  endfunction

  function automatic int dest_port(int p);
    case (p)
      P_R:     return P_L;
      P_L:     return P_R;
      default: return P_A;
    endcase
  endfunction

  task automatic make_traffic();
    tflit_t f;
    logic [31:0] key;
    int dst, len;
    for (int s = 0; s < NODES; s++)
      for (int k = 0; k < PKTS; k++) begin
        dst = $urandom_range(NODES - 1);
        len = $urandom_range(4, 1);
        key = {16'h0, 8'(seq[s]), 4'(s), 4'(dst)};
        seq[s]++;
        f.meta = '{head: 1'b1, tail: 1'b0, vc: 1'($urandom_range(1))};
        f.data = key;
        src_q[s].push_back(f);
        exp_pl[key] = {};
        for (int j = 0; j < len; j++) begin
          f.meta.head = 1'b0;
          f.meta.tail = (j == len - 1);
          f.data      = {key[15:0], 8'(j), 8'($urandom)};
          src_q[s].push_back(f);
          exp_pl[key].push_back(f.data);
        end
        n_pkts++;
      end
  endtask

  function automatic bit busy();
    for (int s = 0; s < NODES; s++) if (src_q[s].size() != 0) return 1;
    return exp_pl.size() != 0;
  endfunction

  // one clock cycle of stimulus and checking, done at the falling edge
  task automatic step(bit inject);
    logic [1:0]  md;
    logic [NN-1:0] pat;
    logic [31:0] d;
    int j, q;
    @(negedge clk);
    // NI back-pressure and source flits
    for (int s = 0; s < NODES; s++) begin
      ni_out_ready[s] = ($urandom_range(99) < 75);
      ni_in_valid[s]  = (src_q[s].size() != 0);
      if (ni_in_valid[s]) begin
        ni_in_meta[s] = src_q[s][0].meta;
        ni_in_data[s] = src_q[s][0].data;
      end
    end
    // error injection on links that carry a flit
    link_flip = '0;
    for (int i = 0; i < NODES; i++)
      for (int p = 0; p < 3; p++)
        if (dut.o_valid[i][p]) begin
          if (p == P_A) n_across++;
          if (dut.o_meta[i][p].vc) n_vc1++; else n_vc0++;
          d  = dut.o_word[i][p][31:0];
          md = mode(policy, dut.o_meta[i][p].head);
          if (inject && $urandom_range(99) < 12) begin
            if (md[1]) begin
              pat = '0;
              pat[$urandom_range(NN - 1)] = 1'b1;
              link_flip[i][p] = pat;
              n_corr++;
            end else if (!chk_hit.exists(d)) begin
              pat = '0;
              pat[$urandom_range(NN - 1, 32)] = 1'b1;
              link_flip[i][p] = pat;
              chk_hit[d] = 1'b1;
              if (md[0]) n_det_ss++;
            end
          end
        end
    #1;
    // s-s Error flags at the receiving router inputs
    for (int i = 0; i < NODES; i++)
      for (int p = 0; p < 3; p++) begin
        j = dest_node(i, p);
        q = dest_port(p);
        if (dut.o_valid[i][p]) begin
          md = mode(policy, dut.o_meta[i][p].head);
          d  = dut.o_word[i][p][31:0];
          check(err_ss[j][q] == (md == 2'b01 && chk_hit.exists(d)),
                $sformatf("err_ss node %0d port %0d flit %h", j, q, d));
        end else begin
          check(!err_ss[j][q], "err_ss without flit");
        end
      end
    // deliveries at the NIs (transfer at the next rising edge)
    for (int s = 0; s < NODES; s++) begin
      if (ni_out_valid[s] && !ni_out_ready[s]) n_ni_stall++;
      if (ni_in_valid[s] && !ni_in_ready[s]) n_inj_stall++;
      if (ni_out_valid[s] && ni_out_ready[s]) begin
        d = ni_out_data[s];
        if (ni_out_meta[s].head) begin
          check(exp_pl.exists(d), $sformatf("unknown header %h at node %0d", d, s));
          check(int'(d[3:0]) == s, $sformatf("header %h delivered to node %0d", d, s));
          check(!ni_out_error[s], "NI error on header");
          cur_key[s] = d;
          cur_idx[s] = 0;
        end else if (exp_pl.exists(cur_key[s]) && cur_idx[s] < exp_pl[cur_key[s]].size()) begin
          check(d == exp_pl[cur_key[s]][cur_idx[s]],
                $sformatf("payload %h exp %h node %0d", d, exp_pl[cur_key[s]][cur_idx[s]], s));
          check(ni_out_error[s] == (mode(policy, 1'b0) == 2'b00 && chk_hit.exists(d)),
                $sformatf("NI error flag %0d on %h", ni_out_error[s], d));
          if (ni_out_error[s]) n_det_ee++;
          cur_idx[s]++;
          check(ni_out_meta[s].tail == (cur_idx[s] == exp_pl[cur_key[s]].size()), "tail flag");
          if (ni_out_meta[s].tail) exp_pl.delete(cur_key[s]);
        end else begin
          check(0, $sformatf("unexpected payload %h at node %0d", d, s));
        end
      end
      if (ni_in_valid[s] && ni_in_ready[s]) void'(src_q[s].pop_front());
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d packets outstanding", exp_pl.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic policy_e pols [5] = '{POL_I, POL_II, POL_III, POL_IV, POL_V};
    automatic int guard;
    policy       = POL_I;
    link_flip    = '0;
    ni_in_valid  = '0;
    ni_in_meta   = '0;
    ni_in_data   = '0;
    ni_out_ready = '0;
    for (int s = 0; s < NODES; s++) seq[s] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 5; ph++) begin
      if (policy != pols[ph]) n_switch++;
      policy = pols[ph];
      make_traffic();
      guard = 0;
      while (busy() && guard < 20000) begin
        step(1'b1);
        guard++;
      end
      check(!busy(), $sformatf("policy %0d: all packets delivered", ph + 1));
      repeat (10) step(1'b0);
      chk_hit.delete();
    end
    $display("packets=%0d corrections=%0d ss_detections=%0d ee_detections=%0d ni_stalls=%0d inj_stalls=%0d vc0=%0d vc1=%0d across=%0d switches=%0d",
             n_pkts, n_corr, n_det_ss, n_det_ee, n_ni_stall, n_inj_stall, n_vc0, n_vc1, n_across, n_switch);
    check(n_corr > 0,      "correction happened");
    check(n_det_ss > 0,    "s-s detection happened");
    check(n_det_ee > 0,    "e-e detection happened");
    check(n_ni_stall > 0,  "NI back-pressure happened");
    check(n_inj_stall > 0, "injection back-pressure happened");
    check(n_vc0 > 0 && n_vc1 > 0, "both VCs used");
    check(n_across > 0,    "across links used");
    check(n_switch == 4,   "policy switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
