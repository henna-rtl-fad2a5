// tb_traffic_manager: bursts faster than the reader (random out_ready) so
// the queue fills. A reference queue of depth 16 models tail drop; order,
// contents, drop pulses, drop count and fill level are all checked.
module tb_traffic_manager;
  import henna_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, out_ready = 0, drop;
  pkt_t in_pkt = '0, out_pkt;
  logic [31:0] drop_count;
  logic [4:0] level;
  int checks = 0, failures = 0, drops = 0, fulls = 0;

  traffic_manager #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pkt_t q[$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      bit exp_drop, do_pop;
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) < ((n / 1000) % 2 == 0 ? 8 : 3));
      for (int i = 0; i < int'(WIN_BYTES); i++) in_pkt.hdr[i] = 8'($urandom);
      in_pkt.tag = 8'($urandom);
      out_ready = ($urandom_range(0, 1) != 0);
      #1;
      checks++;
      if (level != 5'(q.size()) || out_valid != (q.size() != 0)) begin
        failures++;
        if (failures < 10) $display("level %0d model %0d", level, q.size());
      end
      do_pop = out_ready && q.size() != 0;
      if (do_pop) begin
        checks++;
        if (out_pkt !== q[0]) failures++;
      end
      exp_drop = in_valid && q.size() == DEPTH && !do_pop;
      if (q.size() == DEPTH) fulls++;
      checks++;
      if (drop !== exp_drop) failures++;
      if (exp_drop) drops++;
      @(posedge clk);
      if (do_pop) void'(q.pop_front());
      if (in_valid && !exp_drop) q.push_back(in_pkt);
    end
    @(negedge clk);
    checks++;
    if (drop_count != 32'(drops) || drops == 0 || fulls == 0) failures++;
    $display("drops %0d", drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
