// henna_top: hierarchical (two-stage) packet classifier laid over the
// ingress and egress pipelines of a programmable switch.
//
// Ingress: ingress_parser -> ingress_control (random forest, 3 match-action
// stages) -> ingress_deparser, which appends the chosen class group to the
// packet. The traffic_manager queues packets between the pipelines. Egress:
// egress_parser (re-parses features and reads the group) -> egress_control
// (the decision tree of that group) -> egress_deparser, which writes the
// device class into the same header byte and hands the packet to the port.
//
// Interface: one header window per cycle on in_valid/in_hdr (ingress never
// stalls); packets leave on out_valid/out_ready/out_pkt. All tables are
// written through `cfg`, one entry per cycle. Latency with an empty queue and
// a ready port: 10 cycles from in_valid to out_valid (five ingress register
// stages, one cycle through the queue, four egress register stages). The ev_* outputs pulse once per event, for monitoring.
// Pipeline order and table roles follow the published design; the handshake,
// the queue and the table sizes are this design's choices.
module henna_top
  import henna_pkg::*;
#(
  parameter int unsigned RF_TREES    = 3,
  parameter int unsigned GROUPS      = N_GROUPS,
  parameter int unsigned FT_DEPTH    = 64,
  parameter int unsigned CT_DEPTH    = 128,
  parameter int unsigned TM_DEPTH    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_wr_t     cfg,
  input  logic        in_valid,
  input  win_t        in_hdr,
  output logic        out_valid,
  input  logic        out_ready,
  output pkt_t        out_pkt,
  output logic [31:0] tm_drop_count,
  output logic        ev_bypass,     // a non-IPv4 packet skipped classification
  output logic        ev_vote_tie,   // the vote was decided by certainty
  output logic        ev_s1_miss,    // IPv4 packet with no tree hit in stage 1
  output logic        ev_s2_miss,    // grouped packet whose stage-2 tree missed
  output logic        ev_drop,       // the queue dropped a packet
  output logic        ev_stall       // the egress pipeline was held
);

  // ---------------- ingress ----------------
  logic   ip_valid;
  phv_t   ip_phv;
  win_t   ip_hdr;

  ingress_parser u_iparser (
    .clk, .rst_n,
    .in_valid (in_valid), .in_hdr (in_hdr),
    .out_valid(ip_valid), .out_phv(ip_phv), .out_hdr(ip_hdr)
  );

  logic   ic_valid, ic_group_ok, ic_bypass, ic_tie;
  class_t ic_group;
  win_t   ic_hdr;

  ingress_control #(.RF_TREES(RF_TREES), .FT_DEPTH(FT_DEPTH), .CT_DEPTH(CT_DEPTH)) u_ictl (
    .clk, .rst_n, .cfg,
    .in_valid    (ip_valid), .in_phv(ip_phv), .in_hdr(ip_hdr),
    .out_valid   (ic_valid), .out_hdr(ic_hdr),
    .out_group_ok(ic_group_ok), .out_group(ic_group),
    .out_bypass  (ic_bypass), .out_tie(ic_tie)
  );

  assign ev_bypass   = ic_valid && ic_bypass;
  assign ev_vote_tie = ic_valid && ic_tie;
  assign ev_s1_miss  = ic_valid && !ic_bypass && !ic_group_ok;

  logic id_valid;
  pkt_t id_pkt;

  ingress_deparser u_ideparser (
    .clk, .rst_n,
    .in_valid (ic_valid), .in_hdr(ic_hdr),
    .in_group_ok(ic_group_ok), .in_group(ic_group),
    .out_valid(id_valid), .out_pkt(id_pkt)
  );

  // ---------------- traffic manager ----------------
  logic                        tm_valid, tm_ready, stall;
  pkt_t                        tm_pkt;
  logic [$clog2(TM_DEPTH):0]   tm_level;

  traffic_manager #(.DEPTH(TM_DEPTH)) u_tm (
    .clk, .rst_n,
    .in_valid  (id_valid), .in_pkt(id_pkt),
    .out_valid (tm_valid), .out_ready(tm_ready), .out_pkt(tm_pkt),
    .drop      (ev_drop), .drop_count(tm_drop_count), .level(tm_level)
  );

  assign tm_ready = !stall;
  assign ev_stall = stall;

  // ---------------- egress ----------------
  logic   ep_valid, ep_group_ok;
  phv_t   ep_phv;
  pkt_t   ep_pkt;
  class_t ep_group;

  egress_parser u_eparser (
    .clk, .rst_n, .en(!stall),
    .in_valid (tm_valid), .in_pkt(tm_pkt),
    .out_valid(ep_valid), .out_phv(ep_phv), .out_pkt(ep_pkt),
    .out_group_ok(ep_group_ok), .out_group(ep_group)
  );

  logic   ec_valid, ec_class_ok;
  pkt_t   ec_pkt;
  class_t ec_class;

  egress_control #(.GROUPS(GROUPS), .FT_DEPTH(FT_DEPTH), .CT_DEPTH(CT_DEPTH)) u_ectl (
    .clk, .rst_n, .en(!stall), .cfg,
    .in_valid   (ep_valid), .in_phv(ep_phv), .in_pkt(ep_pkt),
    .in_group_ok(ep_group_ok), .in_group(ep_group),
    .out_valid  (ec_valid), .out_pkt(ec_pkt),
    .out_class_ok(ec_class_ok), .out_class(ec_class)
  );

  assign ev_s2_miss = !stall && ec_valid && ec_pkt.tag.valid && !ec_class_ok;

  egress_deparser u_edeparser (
    .clk, .rst_n,
    .in_valid   (ec_valid), .in_pkt(ec_pkt),
    .in_class_ok(ec_class_ok), .in_class(ec_class),
    .stall      (stall),
    .out_valid  (out_valid), .out_ready(out_ready), .out_pkt(out_pkt)
  );

endmodule
