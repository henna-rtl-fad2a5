// traffic_manager: queue between the ingress and egress pipelines.
//
// A first-in first-out buffer of DEPTH packets. Ingress never stalls: it
// writes one packet per cycle; when the queue is full the arriving packet is
// dropped and counted (tail drop). Egress takes the head packet with
// out_ready; out_valid/out_pkt show the head (first-word fall-through).
// A packet written in one cycle can be read in the next. The published design names
// this unit only; a single tail-drop FIFO is the simplest thing that carries
// packets from ingress to egress, and its depth is this design's choice.
module traffic_manager
  import henna_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  pkt_t        in_pkt,
  output logic        out_valid,
  input  logic        out_ready,
  output pkt_t        out_pkt,
  output logic        drop,        // pulse: a packet was dropped this cycle
  output logic [31:0] drop_count,
  output logic [AW:0] level
);

  pkt_t        mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;
  logic        full, empty, push, pop;

  assign level     = wr_ptr - rd_ptr;
  assign full      = (level == (AW+1)'(DEPTH));
  assign empty     = (level == '0);
  assign pop       = out_ready && !empty;
  assign push      = in_valid && (!full || pop);
  assign drop      = in_valid && !push;
  assign out_valid = !empty;
  assign out_pkt   = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      drop_count <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      if (drop) drop_count <= drop_count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr[AW-1:0]] <= in_pkt;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));

endmodule
