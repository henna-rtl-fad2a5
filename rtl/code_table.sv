// code_table: ternary table holding the leaves of one decision tree.
//
// The key is the concatenation of this tree's feature-level codes, feature f
// in key[f*CODE_W +: CODE_W]. Each entry describes the path to one leaf:
// `value` gives the decisions taken at the nodes on the path and `mask` marks
// which bits matter (1 = compare, 0 = wildcard for nodes off the path). The
// action data is the leaf's class and a certainty value telling how reliable
// the tree's decision is (used by the voting table to break ties).
//
// Lookup is combinational (the enclosing stage registers it); the lowest
// matching index wins; a miss gives hit=0. Entries are written one per cycle
// and are invalid after reset. Ternary leaf encoding and the certainty field
// follow the published mapping; sizes, priority and miss handling are this
// design's choices.
module code_table
  import henna_pkg::*;
#(
  parameter int unsigned DEPTH = 128,     // leaves per tree
  parameter int unsigned KW    = N_FEAT * CODE_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic          wr_valid,
  input  logic [KW-1:0] wr_value,
  input  logic [KW-1:0] wr_mask,
  input  class_t        wr_class,
  input  cert_t         wr_cert,
  input  logic [KW-1:0] key,
  output logic          hit,
  output class_t        cls,
  output cert_t         cert
);

  logic [DEPTH-1:0] valid_q;
  logic [KW-1:0]    value_q [DEPTH];
  logic [KW-1:0]    mask_q  [DEPTH];
  class_t           class_q [DEPTH];
  cert_t            cert_q  [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_en) valid_q[wr_addr] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      value_q[wr_addr] <= wr_value & wr_mask;
      mask_q[wr_addr]  <= wr_mask;
      class_q[wr_addr] <= wr_class;
      cert_q[wr_addr]  <= wr_cert;
    end
  end

  always_comb begin
    hit  = 1'b0;
    cls  = '0;
    cert = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (valid_q[i] && ((key & mask_q[i]) == value_q[i])) begin
        hit  = 1'b1;
        cls  = class_q[i];
        cert = cert_q[i];
      end
    end
  end

endmodule
