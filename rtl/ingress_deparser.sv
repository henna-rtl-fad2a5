// ingress_deparser: reassembles the packet at the end of ingress.
//
// Appends the one-byte classification header behind the header window. For
// a classified packet it carries the class group from the first stage
// (valid=1, final_c=0); for a bypassed packet, or one no tree could
// classify, the label is empty (valid=0). The packet then goes to the
// traffic manager. One register stage. Carrying the group in a header field
// to egress follows the published design; its format is this design's choice.
module ingress_deparser
  import henna_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  win_t   in_hdr,
  input  logic   in_group_ok,
  input  class_t in_group,
  output logic   out_valid,
  output pkt_t   out_pkt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_pkt.hdr         <= in_hdr;
      out_pkt.tag.valid   <= in_group_ok;
      out_pkt.tag.final_c <= 1'b0;
      out_pkt.tag.rsvd    <= 1'b0;
      out_pkt.tag.id      <= in_group_ok ? in_group : '0;
    end
  end

endmodule
