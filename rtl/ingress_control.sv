// ingress_control: first classification stage, a random forest that assigns
// each packet to a class group.
//
// Three match-action stages, one register each:
//   M/A 0  one feature table per feature (N_FEAT of them), each returning the
//          feature-level code bits of all RF_TREES trees;
//   M/A 1  one code table per tree, keyed by that tree's codes of all
//          features, returning the tree's class (here: a group) and certainty;
//   M/A 2  the voting table: majority over trees, ties broken by certainty.
// A packet may enter every cycle; the result leaves 3 cycles later. Packets
// that are not IPv4 skip classification (out_group_ok = 0, out_bypass = 1).
// Tables are written through `cfg` (stage = ingress). The stage split and
// table roles follow the published design; sizes are this design's choice.
module ingress_control
  import henna_pkg::*;
#(
  parameter int unsigned RF_TREES = 3,
  parameter int unsigned FT_DEPTH = 64,
  parameter int unsigned CT_DEPTH = 128
) (
  input  logic    clk,
  input  logic    rst_n,
  input  cfg_wr_t cfg,
  input  logic    in_valid,
  input  phv_t    in_phv,
  input  win_t    in_hdr,
  output logic    out_valid,
  output win_t    out_hdr,
  output logic    out_group_ok,
  output class_t  out_group,
  output logic    out_bypass,
  output logic    out_tie
);

  localparam int unsigned CW = RF_TREES * CODE_W;

  logic cfg_here;
  assign cfg_here = cfg.we && cfg.stage == STG_INGRESS;

  // ---------------- M/A 0: feature tables ----------------
  logic [CW-1:0] ft_code [N_FEAT];
  logic [N_FEAT-1:0] ft_hit;

  for (genvar f = 0; f < N_FEAT; f++) begin : g_ft
    feature_table #(.DEPTH(FT_DEPTH), .CW(CW)) u_ft (
      .clk, .rst_n,
      .wr_en   (cfg_here && cfg.kind == TBL_FEATURE && cfg.idx == 4'(f)),
      .wr_addr (cfg.addr[$clog2(FT_DEPTH)-1:0]),
      .wr_valid(cfg.valid),
      .wr_lo   (cfg.lo),
      .wr_hi   (cfg.hi),
      .wr_code (cfg.code[CW-1:0]),
      .key     (in_phv.feat[f]),
      .hit     (ft_hit[f]),
      .code    (ft_code[f])
    );
  end

  logic          s0_valid, s0_ipv4;
  win_t          s0_hdr;
  logic [KEY_W-1:0] s0_key [RF_TREES];   // per-tree concatenated codes

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s0_valid <= 1'b0;
    else        s0_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      s0_ipv4 <= in_phv.ipv4;
      s0_hdr  <= in_hdr;
      for (int t = 0; t < RF_TREES; t++)
        for (int f = 0; f < N_FEAT; f++)
          s0_key[t][f*CODE_W +: CODE_W] <= ft_code[f][t*CODE_W +: CODE_W];
    end
  end

  // ---------------- M/A 1: code tables ----------------
  logic [RF_TREES-1:0] ct_hit;
  class_t              ct_class [RF_TREES];
  cert_t               ct_cert  [RF_TREES];

  for (genvar t = 0; t < RF_TREES; t++) begin : g_ct
    code_table #(.DEPTH(CT_DEPTH), .KW(KEY_W)) u_ct (
      .clk, .rst_n,
      .wr_en   (cfg_here && cfg.kind == TBL_CODE && cfg.idx == 4'(t)),
      .wr_addr (cfg.addr[$clog2(CT_DEPTH)-1:0]),
      .wr_valid(cfg.valid),
      .wr_value(cfg.value),
      .wr_mask (cfg.mask),
      .wr_class(cfg.cls),
      .wr_cert (cfg.cert),
      .key     (s0_key[t]),
      .hit     (ct_hit[t]),
      .cls     (ct_class[t]),
      .cert    (ct_cert[t])
    );
  end

  logic                s1_valid, s1_ipv4;
  win_t                s1_hdr;
  logic [RF_TREES-1:0] s1_hit;
  class_t              s1_class [RF_TREES];
  cert_t               s1_cert  [RF_TREES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= s0_valid;
  end

  always_ff @(posedge clk) begin
    if (s0_valid) begin
      s1_ipv4  <= s0_ipv4;
      s1_hdr   <= s0_hdr;
      s1_hit   <= ct_hit & {RF_TREES{s0_ipv4}};
      s1_class <= ct_class;
      s1_cert  <= ct_cert;
    end
  end

  // ---------------- M/A 2: voting table ----------------
  logic   v_valid, v_tie;
  class_t v_class;

  voting_table #(.TREES(RF_TREES)) u_vote (
    .in_valid(s1_hit),
    .in_class(s1_class),
    .in_cert (s1_cert),
    .valid   (v_valid),
    .cls     (v_class),
    .tie     (v_tie)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    if (s1_valid) begin
      out_hdr      <= s1_hdr;
      out_group_ok <= v_valid;
      out_group    <= v_class;
      out_bypass   <= !s1_ipv4;
      out_tie      <= v_tie;
    end
  end

endmodule
