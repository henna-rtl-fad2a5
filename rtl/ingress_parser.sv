// ingress_parser: first parser of the pipeline.
//
// Takes the header window of one packet per cycle and extracts, into the
// packet header vector, the nine classification features (TCP flags, L4
// ports, IPv4 total length) with henna_pkg::extract_features. Non-IPv4
// packets are marked (phv.ipv4 = 0) and later bypass classification.
// One register stage: outputs appear one cycle after the input, and a new
// packet may enter every cycle. Which header fields are features follows the
// published use case; taking the packet length from the IPv4 total-length
// field and reading absent L4 fields as 0 are this design's choices.
module ingress_parser
  import henna_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  win_t in_hdr,
  output logic out_valid,
  output phv_t out_phv,
  output win_t out_hdr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_phv <= extract_features(in_hdr);
      out_hdr <= in_hdr;
    end
  end

endmodule
