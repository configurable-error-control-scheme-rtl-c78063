// noc_ecc_top - Spidergon network on chip with configurable link error control.
//
// NODES routers (spidergon_router) form a ring with extra across links:
// node i's R output drives node i+1's L input, its L output drives node
// i-1's R input, and its A output drives node i+NODES/2's A input; credits
// run back the same way. Every node's network-interface channel is brought
// out as a port, so the IP cores and network interfaces (not part of this
// design) attach outside. The error control policy (I..V) is a run-time
// input shared by all routers; CODE and ARCH select the code and the router
// structure at elaboration.
//
// link_flip models the noisy wires: link_flip[i][p] is XOR-ed into the
// codeword leaving node i on channel p (R, L, A) while that link carries a
// flit, so a test can inject single, double or symbol errors on any hop. Tie
// it to zero in normal use.
//
// With the default 12 nodes and across-first routing a packet crosses at most
// three links (one across link and two ring links, or three ring links),
// matching a worst case of three decoding hops per flit.
//
// Timing without contention: three cycles from the source NI hand-shake to
// the first link, four cycles per link hop, the last one ending in the
// destination NI output register.
module noc_ecc_top
  import ecc_pkg::*;
#(
  parameter code_e CODE  = CODE_HSIAO,
  parameter arch_e ARCH  = ARCH_SS_HP,
  parameter int    NODES = 12,
  parameter int    DEPTH = 4,
  localparam int   N     = code_len(CODE)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  policy_e                        policy,
  input  logic [NODES-1:0][2:0][N-1:0]   link_flip,
  input  logic [NODES-1:0]               ni_in_valid,
  output logic [NODES-1:0]               ni_in_ready,
  input  flit_meta_t [NODES-1:0]         ni_in_meta,
  input  logic [NODES-1:0][K-1:0]        ni_in_data,
  output logic [NODES-1:0]               ni_out_valid,
  input  logic [NODES-1:0]               ni_out_ready,
  output flit_meta_t [NODES-1:0]         ni_out_meta,
  output logic [NODES-1:0][K-1:0]        ni_out_data,
  output logic [NODES-1:0]               ni_out_error,
  output logic [NODES-1:0][2:0]          err_ss
);
  logic       [NODES-1:0][2:0]          o_valid, i_valid;
  flit_meta_t [NODES-1:0][2:0]          o_meta,  i_meta;
  logic       [NODES-1:0][2:0][N-1:0]   o_word,  i_word;
  logic       [NODES-1:0][2:0][NVC-1:0] i_credit, o_credit;

  for (genvar i = 0; i < NODES; i++) begin : g_node
    localparam int NEXT = (i + 1) % NODES;
    localparam int PREV = (i + NODES - 1) % NODES;
    localparam int ACR  = (i + NODES / 2) % NODES;

    // links into node i: from PREV's R output, NEXT's L output, ACR's A output
    assign i_valid[i][P_L] = o_valid[PREV][P_R];
    assign i_meta [i][P_L] = o_meta [PREV][P_R];
    assign i_word [i][P_L] = o_word [PREV][P_R]
                           ^ (o_valid[PREV][P_R] ? link_flip[PREV][P_R] : '0);
    assign i_valid[i][P_R] = o_valid[NEXT][P_L];
    assign i_meta [i][P_R] = o_meta [NEXT][P_L];
    assign i_word [i][P_R] = o_word [NEXT][P_L]
                           ^ (o_valid[NEXT][P_L] ? link_flip[NEXT][P_L] : '0);
    assign i_valid[i][P_A] = o_valid[ACR][P_A];
    assign i_meta [i][P_A] = o_meta [ACR][P_A];
    assign i_word [i][P_A] = o_word [ACR][P_A]
                           ^ (o_valid[ACR][P_A] ? link_flip[ACR][P_A] : '0);

    // credits back to node i's outputs from the inputs they feed
    assign o_credit[i][P_R] = i_credit[NEXT][P_L];
    assign o_credit[i][P_L] = i_credit[PREV][P_R];
    assign o_credit[i][P_A] = i_credit[ACR][P_A];

    spidergon_router #(
      .CODE (CODE), .ARCH (ARCH), .NODES (NODES), .NODE_ID (i), .DEPTH (DEPTH)
    ) u_router (
      .clk          (clk),
      .rst_n        (rst_n),
      .policy       (policy),
      .in_valid     (i_valid[i]),
      .in_meta      (i_meta[i]),
      .in_word      (i_word[i]),
      .in_credit    (i_credit[i]),
      .out_valid    (o_valid[i]),
      .out_meta     (o_meta[i]),
      .out_word     (o_word[i]),
      .out_credit   (o_credit[i]),
      .ni_in_valid  (ni_in_valid[i]),
      .ni_in_ready  (ni_in_ready[i]),
      .ni_in_meta   (ni_in_meta[i]),
      .ni_in_data   (ni_in_data[i]),
      .ni_out_valid (ni_out_valid[i]),
      .ni_out_ready (ni_out_ready[i]),
      .ni_out_meta  (ni_out_meta[i]),
      .ni_out_data  (ni_out_data[i]),
      .ni_out_error (ni_out_error[i]),
      .err_ss       (err_ss[i])
    );
  end
endmodule
