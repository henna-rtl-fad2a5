// tb_workload_iot21: the 21-device, 5-group classification workload in the
// shape of the published use case, run at line rate.
//
// Model: a 3-tree forest (depth up to 10) for the groups and five group
// trees of depth 10, 6, 8, 10 and 4 for the devices, each pruned to at most
// 128 leaves. The trees are random: the trained trees are not available, so
// the labels themselves are not the published ones, only the model shape.
// Groups and devices:
//   0 switches and plugs: Belkin Wemo switch, iHome, TP-Link plug, LiFX bulb
//   1 sensors: Withings Aura, Belkin Wemo motion sensor, NEST Protect
//   2 video: Withings baby monitor, Insteon camera, TP-Link camera,
//     Samsung SmartCam, Dropcam, Netatmo Welcome
//   3 appliances: PIX-STAR photo frame, Amazon Echo, Tribu speaker,
//     Netatmo weather station, Withings scale, Smart Things
//   4 computers: laptop, MacBook
// A packet enters every cycle for 20000 cycles with the port always ready.
// Checks: every packet leaves, in order, with the label found by walking
// the trees; nothing is dropped; the last packet leaves 10 cycles after it
// entered, so the design sustains one packet per cycle.
module tb_workload_iot21;
  import henna_pkg::*;
  import henna_tb_pkg::*;
  localparam int N = 20000;
  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 1, out_valid;
  cfg_wr_t cfg = '0;
  win_t in_hdr = '0;
  pkt_t out_pkt;
  logic [31:0] tm_drop_count;
  logic ev_bypass, ev_vote_tie, ev_s1_miss, ev_s2_miss, ev_drop, ev_stall;
  int checks = 0, failures = 0, cyc = 0, received = 0, first_in = 0, last_out = 0;
  int per_class[22];

  henna_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (N + 100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { win_t h; henna_tag_t tag; } exp_t;
  exp_t exp_q[$];
  dtree rf[$];
  dtree dts[5];

  function automatic henna_tag_t expect_tag(phv_t p);
    int qc[$], qe[$]; bit qv[$];
    bit ok, tie; int g;
    if (!p.ipv4) return '0;
    for (int t = 0; t < 3; t++) begin
      int l = rf[t].eval_leaf(p.feat);
      qc.push_back(rf[t].cls[l]); qe.push_back(rf[t].cert[l]); qv.push_back(1'b1);
    end
    vote_ref(qc, qe, qv, ok, g, tie);
    if (!ok) return '0;
    return {1'b1, 1'b1, 1'b0, class_t'(dts[g].cls[dts[g].eval_leaf(p.feat)])};
  endfunction

  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    exp_t e;
    received++;
    last_out = cyc;
    checks++;
    if (exp_q.size() == 0) failures++;
    else begin
      e = exp_q.pop_front();
      if (out_pkt.hdr !== e.h || out_pkt.tag !== e.tag) begin
        failures++;
        if (failures < 10) $display("tag %h want %h", out_pkt.tag, e.tag);
      end
      per_class[out_pkt.tag.valid ? int'(out_pkt.tag.id) : 21]++;
    end
  end

  initial begin
    cfg_wr_t wr[$];
    static int depth[5] = '{10, 6, 8, 10, 4};
    foreach (per_class[i]) per_class[i] = 0;
    for (int t = 0; t < 3; t++) begin
      dtree d;
      d = new();
      d.build(10, 0, 5, 128);
      rf.push_back(d);
      code_writes(d, t, STG_INGRESS, 0, wr);
    end
    for (int f = 0; f < int'(N_FEAT); f++) feature_writes(rf, f, STG_INGRESS, 0, wr);
    for (int g = 0; g < 5; g++) begin
      dtree one[$];
      one.delete();
      dts[g] = new();
      dts[g].build(depth[g], grp_first(g), grp_size(g), 128);
      one.push_back(dts[g]);
      code_writes(dts[g], 0, STG_EGRESS, g, wr);
      for (int f = 0; f < int'(N_FEAT); f++) feature_writes(one, f, STG_EGRESS, g, wr);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (wr[i]) begin @(negedge clk) cfg = wr[i]; end
    @(negedge clk) cfg = '0;
    $display("model: %0d table entries; forest leaves %0d %0d %0d", wr.size(),
             rf[0].num_leaves(), rf[1].num_leaves(), rf[2].num_leaves());
    for (int i = 0; i < N; i++) begin
      pkind_e k; win_t w; phv_t p; exp_t e;
      rand_pkt(k, w, p);
      @(negedge clk);
      if (i == 0) first_in = cyc;
      in_valid = 1'b1;
      in_hdr = w;
      e.h = w; e.tag = expect_tag(p);
      exp_q.push_back(e);
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(negedge clk);
    checks += 3;
    if (received != N) begin failures++; $display("received %0d of %0d", received, N); end
    if (tm_drop_count != 0) failures++;
    // first packet enters at first_in, last at first_in + N - 1, leaves 10 later
    if (last_out != first_in + N - 1 + 10) begin
      failures++;
      $display("last packet out at %0d, expected %0d", last_out, first_in + N - 1 + 10);
    end
    for (int c = 0; c < 22; c++) $display("class %0d: %0d packets", c, per_class[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
