// spidergon_router - four-channel wormhole router of a Spidergon NoC with
// configurable link error control.
//
// Channels: R (clockwise neighbour), L (counter-clockwise neighbour),
// A (across node) and NI (the local network interface). Each channel has an
// input stage (link register and two virtual-channel queues), the switch
// stage (one crossbar path per output virtual channel) and an output stage
// (two virtual-channel queues and a link register). Flits travel with
// head/tail/vc side-band bits; the 32-bit flit word is protected by the code
// chosen by CODE. ARCH places the coding blocks:
//   ARCH_EE    encoder on the channel from NI, NI decoder (detection only) on
//              the channel to NI; transit routers check nothing.
//   ARCH_SS_LA router decoder on the R/L/A inputs, which keep only the k data
//              bits; encoder on the R/L/A outputs; k-bit switch.
//   ARCH_SS_HP router decoder on the R/L/A inputs forwarding the whole
//              (corrected) codeword; encoder on the channel from NI; (k+m)-bit
//              switch; NI decoder on the channel to NI for end-to-end checks.
// The run-time input policy (I..V) sets, per flit type, correction or
// detection and switch-to-switch or end-to-end checking through ec_mode_ctrl.
// Decoder Error flags are reported on err_ss (per input, with the flit) and
// ni_out_error; the flit is still forwarded, and what to do about it
// (retransmission request, drop) is left to the receiver.
//
// Flow control: credit based per virtual channel on R/L/A (one credit pulse
// per VC queue pop, links start with DEPTH credits); valid/ready on the NI
// channels. Header flits carry the destination node in word[NW-1:0]; routes
// are computed with Spidergon across-first routing and kept for the body of
// the packet (wormhole). An output VC stays owned by one input from head to
// tail. The channel to NI is held by one packet from head to tail.
//
// Timing without contention: a flit on an input link in cycle t is in the
// input register after edge t+1, in its VC queue after t+2, crosses the switch
// into an output queue at t+3 and is in the output link register after t+4,
// so one hop takes four cycles; a flit accepted from the NI at edge t is on
// the output link after t+3. Coding blocks are combinational in front of the
// registers, so they lengthen the cycle, not the cycle count.
//
// Own choices (not fixed by the scheme): routing function, queue depth, VC
// handling (a packet keeps the VC its source chose), the round-robin switch
// allocation, two VC queues also on the NI channels, and the side-band bits
// being unprotected.
module spidergon_router
  import ecc_pkg::*;
#(
  parameter code_e CODE    = CODE_HSIAO,
  parameter arch_e ARCH    = ARCH_SS_HP,
  parameter int    NODES   = 12,
  parameter int    NODE_ID = 0,
  parameter int    DEPTH   = 4,
  localparam int   M       = check_bits(CODE),
  localparam int   N       = K + M,
  localparam int   NW      = $clog2(NODES)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  policy_e                    policy,
  // network links R, L, A (index P_R, P_L, P_A)
  input  logic [2:0]                 in_valid,
  input  flit_meta_t [2:0]           in_meta,
  input  logic [2:0][N-1:0]          in_word,
  output logic [2:0][NVC-1:0]        in_credit,
  output logic [2:0]                 out_valid,
  output flit_meta_t [2:0]           out_meta,
  output logic [2:0][N-1:0]          out_word,
  input  logic [2:0][NVC-1:0]        out_credit,
  // network interface
  input  logic                       ni_in_valid,
  output logic                       ni_in_ready,
  input  flit_meta_t                 ni_in_meta,
  input  logic [K-1:0]               ni_in_data,
  output logic                       ni_out_valid,
  input  logic                       ni_out_ready,
  output flit_meta_t                 ni_out_meta,
  output logic [K-1:0]               ni_out_data,
  output logic                       ni_out_error,
  // decoder error flags of the R/L/A input channels
  output logic [2:0]                 err_ss
);
  localparam int  IQW   = (ARCH == ARCH_SS_LA) ? K : N;   // queue / switch width
  localparam int  EW    = 3 + IQW;                         // queue entry
  localparam int  NQ    = NPORT * NVC;                     // input / output queues
  localparam int  CW    = $clog2(DEPTH + 1);
  localparam bit  IN_DEC  = (ARCH != ARCH_EE);
  localparam bit  IN_ENC  = (ARCH != ARCH_SS_LA);

  typedef struct packed {
    flit_meta_t       meta;
    logic [IQW-1:0]   word;
  } qent_t;

  // ---------------------------------------------------------------- routing
  function automatic logic [1:0] route(logic [NW-1:0] dst);
    int rel;
    rel = (int'(dst) - NODE_ID + NODES) % NODES;
    if (rel == 0)                   return 2'(P_NI);
    else if (rel <= NODES / 4)      return 2'(P_R);
    else if (rel >= NODES - NODES/4) return 2'(P_L);
    else                            return 2'(P_A);
  endfunction

  // round-robin candidate k after base, modulo n
  function automatic int rr(logic [1:0] base, int k, int n);
    return (int'(base) + k) % n;
  endfunction

  // ------------------------------------------------------------ input stage
  logic [2:0]            ir_valid;
  qent_t [2:0]           ir_ent;
  logic [2:0][IQW-1:0]   dec_word;

  for (genvar p = 0; p < 3; p++) begin : g_in
    if (IN_DEC) begin : g_dec
      logic         cor_det_n, ss_ee_n, derr, sbyp;
      logic [N-1:0] dw;
      ec_mode_ctrl u_mode (
        .policy (policy), .is_head (in_meta[p].head),
        .cor_det_n (cor_det_n), .ss_ee_n (ss_ee_n)
      );
      router_decoder #(.CODE(CODE)) u_dec (
        .win (in_word[p]), .cor_det_n (cor_det_n), .ss_ee_n (ss_ee_n),
        .wout (dw), .error (derr), .s_bypass (sbyp)
      );
      assign dec_word[p] = dw[IQW-1:0];
      assign err_ss[p]   = in_valid[p] && derr;
      if (IQW < N) begin : g_drop
        logic unused_chk;
        assign unused_chk = ^{dw[N-1:IQW], sbyp};
      end else begin : g_keep
        logic unused_byp;
        assign unused_byp = sbyp;
      end
    end else begin : g_nodec
      assign dec_word[p] = in_word[p][IQW-1:0];
      assign err_ss[p]   = 1'b0;
    end

    always_ff @(posedge clk) begin
      if (!rst_n) ir_valid[p] <= 1'b0;
      else        ir_valid[p] <= in_valid[p];
      ir_ent[p] <= '{meta: in_meta[p], word: dec_word[p]};
    end
  end

  // from NI: optional encoder, straight into the VC queue
  logic [IQW-1:0] ni_word;
  if (IN_ENC) begin : g_ni_enc
    logic [N-1:0] enc_w;
    check_bit_gen #(.CODE(CODE)) u_enc (.din (ni_in_data), .wout (enc_w));
    assign ni_word = enc_w[IQW-1:0];
  end else begin : g_ni_noenc
    assign ni_word = ni_in_data[IQW-1:0];
  end

  // input VC queues, index q = port * NVC + vc
  logic  [NQ-1:0] iq_push, iq_pop, iq_empty, iq_full;
  qent_t [NQ-1:0] iq_din, iq_dout;

  always_comb begin
    for (int q = 0; q < NQ; q++) begin
      iq_push[q] = 1'b0;
      iq_din[q]  = '0;
    end
    for (int p = 0; p < 3; p++)
      for (int v = 0; v < NVC; v++) begin
        iq_push[p*NVC+v] = ir_valid[p] && (int'(ir_ent[p].meta.vc) == v);
        iq_din[p*NVC+v]  = ir_ent[p];
      end
    for (int v = 0; v < NVC; v++) begin
      iq_push[P_NI*NVC+v] = ni_in_valid && ni_in_ready && (int'(ni_in_meta.vc) == v);
      iq_din[P_NI*NVC+v]  = '{meta: ni_in_meta, word: ni_word};
    end
  end

  assign ni_in_ready = !iq_full[P_NI*NVC + int'(ni_in_meta.vc)];

  for (genvar q = 0; q < NQ; q++) begin : g_iq
    flit_fifo #(.W(EW), .DEPTH(DEPTH)) u_q (
      .clk (clk), .rst_n (rst_n),
      .push (iq_push[q]), .din (iq_din[q]),
      .pop (iq_pop[q]), .dout (iq_dout[q]),
      .empty (iq_empty[q]), .full (iq_full[q])
    );
  end

  for (genvar p = 0; p < 3; p++) begin : g_cred
    for (genvar v = 0; v < NVC; v++) begin : g_v
      assign in_credit[p][v] = iq_pop[p*NVC+v];
    end
  end

  // ------------------------------------------------------------ switch stage
  logic [NQ-1:0][1:0] rt_reg;      // route held for the body of a packet
  logic [NQ-1:0][1:0] q_out;       // output port requested by each queue head

  always_comb begin
    for (int q = 0; q < NQ; q++)
      q_out[q] = iq_dout[q].meta.head ? route(iq_dout[q].word[NW-1:0]) : rt_reg[q];
  end

  // output VC queues, index o * NVC + v; owner lock per output VC
  logic  [NQ-1:0]        oq_push, oq_pop, oq_empty, oq_full;
  qent_t [NQ-1:0]        oq_din, oq_dout;
  logic  [NQ-1:0]        own_valid;
  logic  [NQ-1:0][1:0]   own_port;
  logic  [NQ-1:0][1:0]   rr_ptr;
  logic  [NQ-1:0]        grant_valid;
  logic  [NQ-1:0][1:0]   grant_port;

  always_comb begin
    iq_pop  = '0;
    oq_push = '0;
    oq_din  = '0;
    for (int ov = 0; ov < NQ; ov++) begin
      grant_valid[ov] = 1'b0;
      grant_port[ov]  = '0;
      if (!oq_full[ov]) begin
        for (int k = 0; k < NPORT; k++) begin
          if (!grant_valid[ov] &&
              !iq_empty[rr(rr_ptr[ov], k, NPORT)*NVC + ov%NVC] &&
              int'(q_out[rr(rr_ptr[ov], k, NPORT)*NVC + ov%NVC]) == ov / NVC &&
              (own_valid[ov] ? (int'(own_port[ov]) == rr(rr_ptr[ov], k, NPORT))
                             : iq_dout[rr(rr_ptr[ov], k, NPORT)*NVC + ov%NVC].meta.head)) begin
            grant_valid[ov] = 1'b1;
            grant_port[ov]  = 2'(rr(rr_ptr[ov], k, NPORT));
          end
        end
      end
    end
    for (int ov = 0; ov < NQ; ov++) begin
      oq_push[ov] = grant_valid[ov];
      oq_din[ov]  = iq_dout[int'(grant_port[ov])*NVC + ov%NVC];
      if (grant_valid[ov]) iq_pop[int'(grant_port[ov])*NVC + ov%NVC] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      own_valid <= '0;
      own_port  <= '0;
      rr_ptr    <= '0;
      rt_reg    <= '0;
    end else begin
      for (int q = 0; q < NQ; q++)
        if (iq_pop[q] && iq_dout[q].meta.head) rt_reg[q] <= q_out[q];
      for (int ov = 0; ov < NQ; ov++) begin
        if (grant_valid[ov]) begin
          if (oq_din[ov].meta.tail) begin
            own_valid[ov] <= 1'b0;
          end else if (oq_din[ov].meta.head) begin
            own_valid[ov] <= 1'b1;
            own_port[ov]  <= grant_port[ov];
          end
          if (oq_din[ov].meta.head) rr_ptr[ov] <= grant_port[ov] + 2'd1;
        end
      end
    end
  end

  for (genvar q = 0; q < NQ; q++) begin : g_oq
    flit_fifo #(.W(EW), .DEPTH(DEPTH)) u_q (
      .clk (clk), .rst_n (rst_n),
      .push (oq_push[q]), .din (oq_din[q]),
      .pop (oq_pop[q]), .dout (oq_dout[q]),
      .empty (oq_empty[q]), .full (oq_full[q])
    );
  end

  // ----------------------------------------------------------- output stage
  // network links: credit counters and VC selection per output
  logic [2:0][NVC-1:0][CW-1:0] credits;
  logic [2:0]                  lsel_valid;
  logic [2:0]                  lsel_vc;
  logic [2:0]                  lrr;

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      lsel_valid[p] = 1'b0;
      lsel_vc[p]    = 1'b0;
      for (int k = 0; k < NVC; k++) begin
        if (!lsel_valid[p] && !oq_empty[p*NVC + rr(2'(lrr[p]), k, NVC)] &&
            credits[p][rr(2'(lrr[p]), k, NVC)] != '0) begin
          lsel_valid[p] = 1'b1;
          lsel_vc[p]    = 1'(rr(2'(lrr[p]), k, NVC));
        end
      end
    end
  end

  logic [2:0][N-1:0] out_enc_word;
  for (genvar p = 0; p < 3; p++) begin : g_out
    logic [IQW-1:0] sel_word;
    assign sel_word = oq_dout[p*NVC + int'(lsel_vc[p])].word;
    if (ARCH == ARCH_SS_LA) begin : g_enc
      check_bit_gen #(.CODE(CODE)) u_enc (.din (sel_word[K-1:0]), .wout (out_enc_word[p]));
    end else begin : g_noenc
      assign out_enc_word[p] = sel_word[N-1:0];
    end
    for (genvar v = 0; v < NVC; v++) begin : g_pop
      assign oq_pop[p*NVC+v] = lsel_valid[p] && (int'(lsel_vc[p]) == v);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= '0;
      lrr       <= '0;
      for (int p = 0; p < 3; p++)
        for (int v = 0; v < NVC; v++) credits[p][v] <= CW'(DEPTH);
    end else begin
      for (int p = 0; p < 3; p++) begin
        out_valid[p] <= lsel_valid[p];
        if (lsel_valid[p]) lrr[p] <= ~lsel_vc[p];
        for (int v = 0; v < NVC; v++)
          credits[p][v] <= credits[p][v]
                         - CW'(lsel_valid[p] && int'(lsel_vc[p]) == v)
                         + CW'(out_credit[p][v]);
      end
    end
    for (int p = 0; p < 3; p++) begin
      out_meta[p] <= oq_dout[p*NVC + int'(lsel_vc[p])].meta;
      out_word[p] <= out_enc_word[p];
    end
  end

  // channel to NI: one packet at a time, optional NI decoder
  logic           nsel_valid, nsel_vc;
  logic           nlock_valid, nlock_vc;
  logic           nrr;
  logic           nload;
  qent_t          nent;
  logic [K-1:0]   ndata;
  logic           nerr;

  always_comb begin
    nsel_valid = 1'b0;
    nsel_vc    = 1'b0;
    if (nlock_valid) begin
      nsel_valid = !oq_empty[P_NI*NVC + int'(nlock_vc)];
      nsel_vc    = nlock_vc;
    end else begin
      for (int k = 0; k < NVC; k++) begin
        if (!nsel_valid && !oq_empty[P_NI*NVC + rr(2'(nrr), k, NVC)]) begin
          nsel_valid = 1'b1;
          nsel_vc    = 1'(rr(2'(nrr), k, NVC));
        end
      end
    end
  end

  assign nload = nsel_valid && (!ni_out_valid || ni_out_ready);
  assign nent  = oq_dout[P_NI*NVC + int'(nsel_vc)];
  for (genvar v = 0; v < NVC; v++) begin : g_npop
    assign oq_pop[P_NI*NVC+v] = nload && (int'(nsel_vc) == v);
  end

  if (ARCH == ARCH_SS_LA) begin : g_ni_nodec
    assign ndata = nent.word[K-1:0];
    assign nerr  = 1'b0;
  end else begin : g_ni_dec
    logic cdn, sen, sen_eff;
    ec_mode_ctrl u_mode (
      .policy (policy), .is_head (nent.meta.head),
      .cor_det_n (cdn), .ss_ee_n (sen)
    );
    // a pure end-to-end router always checks at the destination
    assign sen_eff = (ARCH == ARCH_EE) ? 1'b0 : sen;
    ni_decoder #(.CODE(CODE)) u_nidec (
      .w (nent.word[N-1:0]), .ss_ee_n (sen_eff), .din (ndata), .error (nerr)
    );
    logic unused_cdn;
    assign unused_cdn = cdn;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ni_out_valid <= 1'b0;
      ni_out_error <= 1'b0;
      nlock_valid  <= 1'b0;
      nlock_vc     <= 1'b0;
      nrr          <= 1'b0;
    end else begin
      if (nload) begin
        ni_out_valid <= 1'b1;
        ni_out_error <= nerr;
        if (nent.meta.tail) begin
          nlock_valid <= 1'b0;
          nrr         <= ~nsel_vc;
        end else if (nent.meta.head) begin
          nlock_valid <= 1'b1;
          nlock_vc    <= nsel_vc;
        end
      end else if (ni_out_ready) begin
        ni_out_valid <= 1'b0;
      end
    end
    if (nload) begin
      ni_out_meta <= nent.meta;
      ni_out_data <= ndata;
    end
  end

  // ------------------------------------------------------------- assertions
  for (genvar p = 0; p < 3; p++) begin : g_chk
    for (genvar v = 0; v < NVC; v++) begin : g_v
      a_credit_overflow: assert property (@(posedge clk) disable iff (!rst_n)
        int'(credits[p][v]) <= DEPTH);
    end
  end
  a_ni_stable: assert property (@(posedge clk) disable iff (!rst_n)
    ni_out_valid && !ni_out_ready |=> ni_out_valid && $stable(ni_out_data));
endmodule
