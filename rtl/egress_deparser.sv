// egress_deparser: reassembles the packet at the end of egress.
//
// Overwrites the classification header with the final device class from the
// second stage (valid=1, final_c=1), or clears it when there is none, and
// presents the packet to the output port with a valid/ready handshake. The
// output register holds its packet while out_ready is low; `stall` then
// freezes the whole egress pipeline. Storing the final class in a header
// field follows the published design; the handshake is this design's choice.
module egress_deparser
  import henna_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pkt_t   in_pkt,
  input  logic   in_class_ok,
  input  class_t in_class,
  output logic   stall,
  output logic   out_valid,
  input  logic   out_ready,
  output pkt_t   out_pkt
);

  assign stall = out_valid && !out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     out_valid <= 1'b0;
    else if (!stall) out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (!stall && in_valid) begin
      out_pkt.hdr         <= in_pkt.hdr;
      out_pkt.tag.valid   <= in_class_ok;
      out_pkt.tag.final_c <= in_class_ok;
      out_pkt.tag.rsvd    <= 1'b0;
      out_pkt.tag.id      <= in_class_ok ? in_class : '0;
    end
  end

  // a presented packet must stay unchanged until it is taken
  property p_hold;
    @(posedge clk) disable iff (!rst_n) stall |=> out_valid && $stable(out_pkt);
  endproperty
  a_hold: assert property (p_hold);

endmodule
