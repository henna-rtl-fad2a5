// egress_parser: parser at the head of the egress pipeline.
//
// Parses the packet again as the ingress parser does (same nine features)
// and in addition reads the classification header written at ingress, which
// carries the class group chosen by the first stage. `out_group_ok` is set
// only for a valid group label below N_GROUPS. One register stage, advanced
// when `en` is high (the egress pipeline stalls as a whole when the output
// port is not ready). Re-parsing at egress follows the published design; the
// tag layout and the stall are this design's choices.
module egress_parser
  import henna_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   in_valid,
  input  pkt_t   in_pkt,
  output logic   out_valid,
  output phv_t   out_phv,
  output pkt_t   out_pkt,
  output logic   out_group_ok,
  output class_t out_group
);

  henna_tag_t t;
  assign t = in_pkt.tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (en) out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (en && in_valid) begin
      out_phv      <= extract_features(in_pkt.hdr);
      out_pkt      <= in_pkt;
      out_group_ok <= t.valid && !t.final_c && (t.id < class_t'(N_GROUPS));
      out_group    <= t.id;
    end
  end

endmodule
