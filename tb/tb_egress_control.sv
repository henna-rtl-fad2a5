// tb_egress_control: five random decision trees, one per group (depths 10,
// 6, 8, 10 and 4; each returns only the classes of its group), programmed
// through the write port. Random packets with random group labels (some
// invalid or out of range) stream through with random pipeline holds. The
// class must equal the walk of the selected tree; with no valid group, no
// class. With no holds the result appears 2 cycles after entry.
module tb_egress_control;
  import henna_pkg::*;
  import henna_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0, in_group_ok = 0;
  cfg_wr_t cfg = '0;
  phv_t in_phv = '0;
  pkt_t in_pkt = '0, out_pkt;
  class_t in_group = '0, out_class;
  logic out_valid, out_class_ok;
  int checks = 0, failures = 0, holds = 0, cyc = 0;
  int per_group[6];

  egress_control dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit ok; int c; pkt_t k; int t; } exp_t;
  exp_t exp_q[$];
  dtree dts[5];
  bit last_en = 0, no_holds = 1;

  task automatic check_out();
    if (last_en && out_valid) begin
      exp_t e = exp_q.pop_front();
      checks++;
      if (out_class_ok !== e.ok || (e.ok && int'(out_class) != e.c) || out_pkt !== e.k ||
          (no_holds && cyc - e.t != 2)) begin
        failures++;
        if (failures < 10) $display("t=%0d got %0d/%0d want %0d/%0d lat %0d", cyc, out_class_ok, out_class,
                                    e.ok, e.c, cyc - e.t);
      end
    end
  endtask

  initial begin
    cfg_wr_t wr[$];
    static int depth[5] = '{10, 6, 8, 10, 4};
    foreach (per_group[i]) per_group[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 5; g++) begin
      dtree one[$];
      one.delete();
      dts[g] = new();
      dts[g].build(depth[g], grp_first(g), grp_size(g), 128);
      one.push_back(dts[g]);
      code_writes(dts[g], 0, STG_EGRESS, g, wr);
      for (int f = 0; f < int'(N_FEAT); f++) feature_writes(one, f, STG_EGRESS, g, wr);
    end
    // an ingress write must not reach egress tables
    wr.push_back('{we: 1'b1, stage: STG_INGRESS, kind: TBL_CODE, valid: 1'b1, default: '0});
    foreach (wr[i]) begin @(negedge clk) cfg = wr[i]; end
    @(negedge clk) cfg = '0;
    for (int n = 0; n < 5000; n++) begin
      pkind_e k; win_t w; phv_t p; exp_t e; int g;
      rand_pkt(k, w, p);
      g = $urandom_range(0, 7);
      @(negedge clk);
      check_out();
      if (n == 2500) no_holds = 0;
      en = (n < 2500) || ($urandom_range(0, 4) != 0);
      last_en = en;
      if (!en) holds++;
      if (en) begin
        in_valid    = ($urandom_range(0, 5) != 0);
        in_phv      = p;
        in_pkt      = '{hdr: w, tag: 8'($urandom)};
        in_group_ok = (g < 5) || ($urandom_range(0, 1) != 0);
        in_group    = class_t'(g);
        e.ok = 0; e.c = 0; e.k = in_pkt; e.t = cyc;
        if (in_group_ok && g < 5 && p.ipv4) begin
          e.ok = 1; e.c = dts[g].cls[dts[g].eval_leaf(p.feat)];
        end
        if (in_valid) begin exp_q.push_back(e); per_group[g < 5 ? g : 5]++; end
      end
    end
    @(negedge clk) begin check_out(); in_valid = 0; en = 1; last_en = 1; end
    repeat (4) @(negedge clk) check_out();
    checks++;
    if (exp_q.size() != 0 || holds == 0) failures++;
    foreach (per_group[i]) begin checks++; if (per_group[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
