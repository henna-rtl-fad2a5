// egress_control: second classification stage, one decision tree per class
// group.
//
// The group written by the first stage selects which tree classifies the
// packet. Each group's tree has its own N_FEAT feature tables (code width
// CODE_W, one tree) and one code table returning the device class. Two
// match-action stages, one register each:
//   M/A 0  feature tables of every group look up the packet's features;
//   M/A 1  code tables of every group; the one of the packet's group is kept.
// The pipeline advances when `en` is high. A packet without a valid group,
// or whose tree misses, leaves with out_class_ok = 0. Tables are written
// through `cfg` (stage = egress, group = tree). Per-group trees selected by
// the group follow the published design; sizes are this design's choice.
module egress_control
  import henna_pkg::*;
#(
  parameter int unsigned GROUPS   = N_GROUPS,
  parameter int unsigned FT_DEPTH = 64,
  parameter int unsigned CT_DEPTH = 128
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  cfg_wr_t cfg,
  input  logic    in_valid,
  input  phv_t    in_phv,
  input  pkt_t    in_pkt,
  input  logic    in_group_ok,
  input  class_t  in_group,
  output logic    out_valid,
  output pkt_t    out_pkt,
  output logic    out_class_ok,
  output class_t  out_class
);

  logic cfg_here;
  assign cfg_here = cfg.we && cfg.stage == STG_EGRESS;

  // ---------------- M/A 0: per-group feature tables ----------------
  logic [KEY_W-1:0] key [GROUPS];

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    for (genvar f = 0; f < N_FEAT; f++) begin : g_ft
      logic unused_hit;
      feature_table #(.DEPTH(FT_DEPTH), .CW(CODE_W)) u_ft (
        .clk, .rst_n,
        .wr_en   (cfg_here && cfg.kind == TBL_FEATURE &&
                  cfg.group == GROUP_W'(g) && cfg.idx == 4'(f)),
        .wr_addr (cfg.addr[$clog2(FT_DEPTH)-1:0]),
        .wr_valid(cfg.valid),
        .wr_lo   (cfg.lo),
        .wr_hi   (cfg.hi),
        .wr_code (cfg.code[CODE_W-1:0]),
        .key     (in_phv.feat[f]),
        .hit     (unused_hit),
        .code    (key[g][f*CODE_W +: CODE_W])
      );
    end
  end

  logic             s0_valid, s0_sel_ok;
  class_t           s0_group;
  pkt_t             s0_pkt;
  logic [KEY_W-1:0] s0_key [GROUPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s0_valid <= 1'b0;
    else if (en) s0_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (en && in_valid) begin
      s0_sel_ok <= in_group_ok && in_phv.ipv4 && (in_group < class_t'(GROUPS));
      s0_group  <= in_group;
      s0_pkt    <= in_pkt;
      s0_key    <= key;
    end
  end

  // ---------------- M/A 1: per-group code tables ----------------
  logic [GROUPS-1:0] ct_hit;
  class_t            ct_class [GROUPS];

  for (genvar g = 0; g < GROUPS; g++) begin : g_ct
    cert_t unused_cert;
    code_table #(.DEPTH(CT_DEPTH), .KW(KEY_W)) u_ct (
      .clk, .rst_n,
      .wr_en   (cfg_here && cfg.kind == TBL_CODE && cfg.group == GROUP_W'(g)),
      .wr_addr (cfg.addr[$clog2(CT_DEPTH)-1:0]),
      .wr_valid(cfg.valid),
      .wr_value(cfg.value),
      .wr_mask (cfg.mask),
      .wr_class(cfg.cls),
      .wr_cert (cfg.cert),
      .key     (s0_key[g]),
      .hit     (ct_hit[g]),
      .cls     (ct_class[g]),
      .cert    (unused_cert)
    );
  end

  logic   sel_hit;
  class_t sel_class;
  always_comb begin
    sel_hit   = 1'b0;
    sel_class = '0;
    for (int g = 0; g < GROUPS; g++) begin
      if (s0_sel_ok && s0_group == class_t'(g)) begin
        sel_hit   = ct_hit[g];
        sel_class = ct_class[g];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  out_valid <= 1'b0;
    else if (en) out_valid <= s0_valid;
  end

  always_ff @(posedge clk) begin
    if (en && s0_valid) begin
      out_pkt      <= s0_pkt;
      out_class_ok <= sel_hit;
      out_class    <= sel_class;
    end
  end

endmodule
