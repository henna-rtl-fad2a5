// tb_ingress_deparser: the header window must come out unchanged, one cycle
// later, with the classification header holding the group (or empty).
module tb_ingress_deparser;
  import henna_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_group_ok = 0, out_valid;
  win_t in_hdr = '0;
  class_t in_group = '0;
  pkt_t out_pkt;
  int checks = 0, failures = 0;

  ingress_deparser dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pkt_t exp_q[$];
  always @(negedge clk) if (rst_n && out_valid) begin
    pkt_t e;
    e = exp_q.pop_front();
    checks++;
    if (out_pkt !== e) begin
      failures++;
      if (failures < 10) $display("got tag %h want %h", out_pkt.tag, e.tag);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      pkt_t e;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < int'(WIN_BYTES); i++) in_hdr[i] = 8'($urandom);
      in_group_ok = $urandom_range(0, 3) != 0;
      in_group = class_t'($urandom_range(0, 4));
      e.hdr = in_hdr;
      e.tag = in_group_ok ? {1'b1, 1'b0, 1'b0, in_group} : 8'h00;
      if (in_valid) exp_q.push_back(e);
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
