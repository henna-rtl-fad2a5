// tb_egress_parser: random packets carrying random classification headers;
// checks the re-parsed features, the carried packet and the group decode
// (valid, stage-1 label, id below 5), one cycle later, with random
// pipeline holds (en low) in between.
module tb_egress_parser;
  import henna_pkg::*;
  import henna_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0, out_valid, out_group_ok;
  pkt_t in_pkt = '0, out_pkt;
  phv_t out_phv;
  class_t out_group;
  int checks = 0, failures = 0, holds = 0;

  egress_parser dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { phv_t p; pkt_t k; bit ok; int g; } exp_t;
  exp_t exp_q[$];

  bit last_en = 0;

  // called at a falling edge: the register changed at the edge before only
  // if en was high then
  task automatic check_out();
    if (last_en && out_valid) begin
      exp_t e = exp_q.pop_front();
      checks++;
      if (out_phv !== e.p || out_pkt !== e.k || out_group_ok !== e.ok || (e.ok && int'(out_group) != e.g)) begin
        failures++;
        if (failures < 10) $display("got %0d/%0d want %0d/%0d", out_group_ok, out_group, e.ok, e.g);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      pkind_e k; win_t w; phv_t p; henna_tag_t t; exp_t e;
      rand_pkt(k, w, p);
      t = henna_tag_t'($urandom);
      @(negedge clk);
      check_out();
      en = ($urandom_range(0, 5) != 0);
      last_en = en;
      if (!en) holds++;
      // a new packet is presented only when the stage can take it
      if (en) begin
        in_valid = ($urandom_range(0, 4) != 0);
        in_pkt   = '{hdr: w, tag: t};
        if (in_valid) begin
          e.p = p; e.k = in_pkt; e.ok = t.valid && !t.final_c && t.id < 5; e.g = int'(t.id);
          exp_q.push_back(e);
        end
      end
    end
    @(negedge clk) begin check_out(); in_valid = 0; en = 1; last_en = 1; end
    repeat (3) @(negedge clk) check_out();
    checks++;
    if (exp_q.size() != 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
