// tb_ingress_control: a random 3-tree forest (depth up to 10, at most 128
// leaves per tree, classes = the 5 groups) is turned into feature and code
// table writes. Random packets are then streamed back to back; each group
// must equal the majority vote (certainty tie-break) of the three trees
// evaluated by walking them, and must appear exactly 3 cycles after entry.
module tb_ingress_control;
  import henna_pkg::*;
  import henna_tb_pkg::*;
  localparam int T = 3;
  logic clk = 0, rst_n = 0, in_valid = 0;
  cfg_wr_t cfg = '0;
  phv_t in_phv = '0;
  win_t in_hdr = '0, out_hdr;
  logic out_valid, out_group_ok, out_bypass, out_tie;
  class_t out_group;
  int checks = 0, failures = 0, ties = 0, bypasses = 0, cyc = 0;

  ingress_control #(.RF_TREES(T)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit ok; int g; bit tie; bit byp; win_t h; int c; } exp_t;
  exp_t exp_q[$];
  dtree trees[$];

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = exp_q.pop_front();
    checks++;
    if (out_group_ok !== e.ok || (e.ok && int'(out_group) != e.g) || out_tie !== e.tie ||
        out_bypass !== e.byp || out_hdr !== e.h || cyc - e.c != 3) begin
      failures++;
      if (failures < 10) $display("got %0d/%0d tie %0d want %0d/%0d tie %0d lat %0d",
                                  out_group_ok, out_group, out_tie, e.ok, e.g, e.tie, cyc - e.c);
    end
  end

  initial begin
    cfg_wr_t wr[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < T; t++) begin
      dtree d;
      d = new();
      d.build(10, 0, 5, 128);
      trees.push_back(d);
      code_writes(d, t, STG_INGRESS, 0, wr);
    end
    for (int f = 0; f < int'(N_FEAT); f++) feature_writes(trees, f, STG_INGRESS, 0, wr);
    foreach (wr[i]) begin @(negedge clk) cfg = wr[i]; end
    @(negedge clk) cfg = '0;
    $display("programmed %0d entries", wr.size());
    for (int n = 0; n < 4000; n++) begin
      pkind_e k; win_t w; phv_t p; exp_t e;
      int qc[$], qe[$], l; bit qv[$];
      qc.delete(); qe.delete(); qv.delete();
      rand_pkt(k, w, p);
      if ($urandom_range(0, 3) == 0)      // features anywhere in their range
        for (int f = int'(F_SPORT); f < int'(N_FEAT); f++) p.feat[f] = 16'($urandom);
      for (int t = 0; t < T; t++) begin
        l = trees[t].eval_leaf(p.feat);
        qc.push_back(trees[t].cls[l]); qe.push_back(trees[t].cert[l]); qv.push_back(p.ipv4);
      end
      vote_ref(qc, qe, qv, e.ok, e.g, e.tie);
      e.byp = !p.ipv4; e.h = w;
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      in_phv = p; in_hdr = w;
      e.c = cyc;
      if (in_valid) begin
        exp_q.push_back(e);
        if (e.tie) ties++;
        if (e.byp) bypasses++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || ties == 0 || bypasses == 0) failures++;
    $display("ties %0d bypasses %0d", ties, bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
