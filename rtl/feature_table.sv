// feature_table: range-match table for one packet feature.
//
// All thresholds that the decision nodes of every tree place on this feature
// split its value range into intervals. Each entry holds one interval
// [lo, hi] and the action data for it: the feature-level code, one bit per
// decision node that tests this feature (bit set = "value above the node's
// threshold"), for all trees side by side (tree t in code[t*CODE_W +: CODE_W]).
// One table therefore serves all trees of a random forest.
//
// Lookup is combinational: `hit`/`code` follow `key` in the same cycle; the
// enclosing match-action stage registers them. If several entries match, the
// lowest index wins; a miss returns code 0 (the default action). Entries are
// written one per cycle by the control plane (wr_en, wr_addr) and all are
// invalid after reset. The interval/code scheme follows the published tree
// mapping; the priority rule, the miss action and the write port are this
// design's choices.
module feature_table
  import henna_pkg::*;
#(
  parameter int unsigned DEPTH = 64,      // intervals per feature
  parameter int unsigned CW    = 3 * CODE_W,  // code bits, all trees
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // control-plane write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic          wr_valid,
  input  feat_t         wr_lo,
  input  feat_t         wr_hi,
  input  logic [CW-1:0] wr_code,
  // lookup
  input  feat_t         key,
  output logic          hit,
  output logic [CW-1:0] code
);

  logic [DEPTH-1:0] valid_q;
  feat_t            lo_q   [DEPTH];
  feat_t            hi_q   [DEPTH];
  logic [CW-1:0]    code_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_en) valid_q[wr_addr] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      lo_q[wr_addr]   <= wr_lo;
      hi_q[wr_addr]   <= wr_hi;
      code_q[wr_addr] <= wr_code;
    end
  end

  always_comb begin
    hit  = 1'b0;
    code = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (valid_q[i] && key >= lo_q[i] && key <= hi_q[i]) begin
        hit  = 1'b1;
        code = code_q[i];
      end
    end
  end

endmodule
