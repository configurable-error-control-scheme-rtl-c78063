// tb_noc_run - one end-to-end run of a Spidergon NoC built with a given code
// and router structure; used by tb_noc_variants.
//
// Same traffic, error injection and scoreboard as the default-size test, with
// the expectations of each structure:
//   ARCH_SS_HP  s-s flags follow a check-bit error to the destination (the
//               codeword is forwarded as received); e-e payload errors are
//               flagged by the NI decoder.
//   ARCH_SS_LA  only the router right after the faulty link flags the error,
//               since each output re-encodes the data; nothing reaches the NI.
// Correctable errors are single bits, or whole 2-bit symbols for S2SC.
//   ARCH_EE     routers check nothing; the NI decoder flags every flit, header
//               or payload, whose codeword was hit. Only check-bit errors are
//               injected, as nothing corrects.
// Reports its counts through ports and raises done at the end.
module tb_noc_run
  import ecc_pkg::*;
#(
  parameter arch_e ARCH  = ARCH_SS_HP,
  parameter code_e CODE  = CODE_HSIAO,
  parameter int    NODES = 8
) (
  output int checks,
  output int failures,
  output bit done
);
  import ecc_ref_pkg::*;

  localparam int NN    = code_len(CODE);
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

  noc_ecc_top #(.CODE (CODE), .ARCH (ARCH), .NODES (NODES)) dut (
    .clk (clk), .rst_n (rst_n), .policy (policy), .link_flip (link_flip),
    .ni_in_valid (ni_in_valid), .ni_in_ready (ni_in_ready),
    .ni_in_meta (ni_in_meta), .ni_in_data (ni_in_data),
    .ni_out_valid (ni_out_valid), .ni_out_ready (ni_out_ready),
    .ni_out_meta (ni_out_meta), .ni_out_data (ni_out_data),
    .ni_out_error (ni_out_error), .err_ss (err_ss)
  );

  always #5 clk = ~clk;

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

  function automatic bit exp_ss(logic [1:0] md, bit hit, bit hit_now);
    case (ARCH)
      ARCH_SS_HP: return md == 2'b01 && hit;
      ARCH_SS_LA: return md == 2'b01 && hit_now;
      default:    return 1'b0;
    endcase
  endfunction

  function automatic bit exp_ni(bit hit);
    case (ARCH)
      ARCH_SS_HP: return mode(policy, 1'b0) == 2'b00 && hit;
      ARCH_EE:    return hit;
      default:    return 1'b0;
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
        key = {16'h0, 8'(seq[s]), 4'(s), 4'(dst)};   // NODES <= 16
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
    logic [NODES-1:0][2:0] now_hit;
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
    now_hit   = '0;
    for (int i = 0; i < NODES; i++)
      for (int p = 0; p < 3; p++)
        if (dut.o_valid[i][p]) begin
          if (p == P_A) n_across++;
          if (dut.o_meta[i][p].vc) n_vc1++; else n_vc0++;
          d  = dut.o_word[i][p][31:0];
          md = mode(policy, dut.o_meta[i][p].head);
          if (inject && $urandom_range(99) < 12) begin
            if (md[1] && ARCH != ARCH_EE) begin
              pat = NN'(ref_single_err(CODE));   // one bit, or one 2-bit symbol
              link_flip[i][p] = pat;
              n_corr++;
            end else if (!chk_hit.exists(d)) begin
              pat = '0;
              pat[$urandom_range(NN - 1, 32)] = 1'b1;
              link_flip[i][p] = pat;
              chk_hit[d] = 1'b1;
              if (md[0] && ARCH != ARCH_EE) n_det_ss++;
              now_hit[i][p] = 1'b1;
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
          check(err_ss[j][q] == exp_ss(md, chk_hit.exists(d), now_hit[i][p]),
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
          check(ni_out_error[s] == (ARCH == ARCH_EE && chk_hit.exists(d)), "NI error on header");
          if (ni_out_error[s]) n_det_ee++;
          cur_key[s] = d;
          cur_idx[s] = 0;
        end else if (exp_pl.exists(cur_key[s]) && cur_idx[s] < exp_pl[cur_key[s]].size()) begin
          check(d == exp_pl[cur_key[s]][cur_idx[s]],
                $sformatf("payload %h exp %h node %0d", d, exp_pl[cur_key[s]][cur_idx[s]], s));
          check(ni_out_error[s] == exp_ni(chk_hit.exists(d)),
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
    automatic policy_e pols [5] = '{POL_I, POL_II, POL_III, POL_IV, POL_V};
    automatic int guard;
    checks       = 0;
    failures     = 0;
    done         = 0;
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
    $display("arch %0d code %0d: packets=%0d corrections=%0d ss_detections=%0d ee_detections=%0d ni_stalls=%0d inj_stalls=%0d vc0=%0d vc1=%0d across=%0d switches=%0d",
             ARCH, CODE, n_pkts, n_corr, n_det_ss, n_det_ee, n_ni_stall, n_inj_stall, n_vc0, n_vc1, n_across, n_switch);
    check((n_corr > 0) == (ARCH != ARCH_EE),    "correction happened");
    check((n_det_ss > 0) == (ARCH != ARCH_EE),  "s-s detection happened");
    check((n_det_ee > 0) == (ARCH != ARCH_SS_LA), "e-e detection happened");
    check(n_ni_stall > 0,  "NI back-pressure happened");
    check(n_inj_stall > 0, "injection back-pressure happened");
    check(n_vc0 > 0 && n_vc1 > 0, "both VCs used");
    check(n_across > 0,    "across links used");
    check(n_switch == 4,   "policy switches");
    done = 1;
  end
endmodule
