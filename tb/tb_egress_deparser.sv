// tb_egress_deparser: packets with a random class (or none) and a port that
// is randomly not ready. Every packet must come out once, in order, with the
// final class written into the classification header; stall must equal
// out_valid && !out_ready.
module tb_egress_deparser;
  import henna_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_class_ok = 0, out_valid, out_ready = 1, stall;
  pkt_t in_pkt = '0, out_pkt;
  class_t in_class = '0;
  int checks = 0, failures = 0, stalls = 0;

  egress_deparser dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pkt_t exp_q[$];
  // called between a falling and the next rising edge, inputs settled
  task automatic check_out();
    checks++;
    if (stall !== (out_valid && !out_ready)) failures++;
    if (stall) stalls++;
    if (out_valid && out_ready) begin
      pkt_t e = exp_q.pop_front();
      checks++;
      if (out_pkt !== e) begin
        failures++;
        if (failures < 10) $display("got tag %h want %h", out_pkt.tag, e.tag);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      pkt_t e;
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      check_out();
      if (!stall) begin
        in_valid = ($urandom_range(0, 3) != 0);
        for (int i = 0; i < int'(WIN_BYTES); i++) in_pkt.hdr[i] = 8'($urandom);
        in_pkt.tag  = 8'($urandom);
        in_class_ok = $urandom_range(0, 3) != 0;
        in_class    = class_t'($urandom_range(0, 20));
        e.hdr = in_pkt.hdr;
        e.tag = in_class_ok ? {1'b1, 1'b1, 1'b0, in_class} : 8'h00;
        if (in_valid) exp_q.push_back(e);
      end
    end
    @(negedge clk) begin in_valid = 0; out_ready = 1; #1 check_out(); end
    repeat (3) begin @(negedge clk); #1 check_out(); end
    checks++;
    if (exp_q.size() != 0 || stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
