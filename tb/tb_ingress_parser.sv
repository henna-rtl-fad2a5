// tb_ingress_parser: back-to-back random packets (TCP, UDP, ICMP, ARP, TCP
// with IPv4 options, non-first fragments) built from known feature values;
// the parsed PHV must equal those values exactly one cycle later.
module tb_ingress_parser;
  import henna_pkg::*;
  import henna_tb_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  win_t in_hdr = '0, out_hdr;
  phv_t out_phv;
  int checks = 0, failures = 0;
  int kinds[6];

  ingress_parser dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  phv_t exp_q[$];
  win_t hdr_q[$];

  always @(negedge clk) if (rst_n && out_valid) begin
    phv_t e;
    win_t h;
    e = exp_q.pop_front();
    h = hdr_q.pop_front();
    checks++;
    if (out_phv !== e || out_hdr !== h) begin
      failures++;
      if (failures < 10) $display("got %h want %h", out_phv, e);
    end
  end

  initial begin
    foreach (kinds[i]) kinds[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      pkind_e k; win_t w; phv_t p;
      rand_pkt(k, w, p);
      kinds[int'(k)]++;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_hdr   = w;
      if (in_valid) begin exp_q.push_back(p); hdr_q.push_back(w); end
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    foreach (kinds[i]) begin checks++; if (kinds[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
