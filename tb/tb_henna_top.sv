// tb_henna_top: end-to-end test of the two-stage classifier at its default
// sizes (3-tree forest, 5 group trees, 64-entry feature tables, 128-entry
// code tables, 16-packet queue).
//
// A random forest (groups) and five random group trees (device classes) are
// generated, as in the published use case: forest of 3 trees of depth up to
// 10, group trees of depth 4 to 10, 21 classes in 5 groups of 4, 3, 6, 6 and
// 2. Packets are built from known feature values and the expected label is
// found by walking the trees. Phases:
//   0  no table programmed: every IPv4 packet misses in stage 1;
//   1  only the ingress forest programmed: grouped packets miss in stage 2;
//   2  everything programmed, port always ready: full check, and the
//      latency of a lone packet (10 cycles) is measured;
//   3  as 2, but the port is often not ready, so egress stalls and the
//      queue overflows and drops packets.
// Output packets must be an in-order subsequence of the input; the packets
// skipped must equal the queue's drop count. Each mechanism (bypass, vote
// tie, stage-1 miss, stage-2 miss, stall, drop) must occur at least once.
module tb_henna_top;
  import henna_pkg::*;
  import henna_tb_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 1, out_valid;
  cfg_wr_t cfg = '0;
  win_t in_hdr = '0;
  pkt_t out_pkt;
  logic [31:0] tm_drop_count;
  logic ev_bypass, ev_vote_tie, ev_s1_miss, ev_s2_miss, ev_drop, ev_stall;
  int checks = 0, failures = 0, cyc = 0, phase = 0, skipped = 0, received = 0;
  int n_bypass = 0, n_tie = 0, n_s1 = 0, n_s2 = 0, n_drop = 0, n_stall = 0;

  henna_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    n_bypass += int'(ev_bypass); n_tie += int'(ev_vote_tie); n_s1 += int'(ev_s1_miss);
    n_s2 += int'(ev_s2_miss); n_drop += int'(ev_drop); n_stall += int'(ev_stall);
  end

  typedef struct { win_t h; henna_tag_t tag; int c; } exp_t;
  exp_t exp_q[$];
  dtree rf[$];
  dtree dts[5];
  int last_lat = 0;

  // expected label of a packet for the tables programmed in this phase
  function automatic henna_tag_t expect_tag(phv_t p);
    int qc[$], qe[$]; bit qv[$];
    bit ok, tie; int g;
    if (!p.ipv4 || phase == 0) return '0;
    for (int t = 0; t < 3; t++) begin
      int l = rf[t].eval_leaf(p.feat);
      qc.push_back(rf[t].cls[l]); qe.push_back(rf[t].cert[l]); qv.push_back(1'b1);
    end
    vote_ref(qc, qe, qv, ok, g, tie);
    if (!ok || phase == 1) return '0;
    return {1'b1, 1'b1, 1'b0, class_t'(dts[g].cls[dts[g].eval_leaf(p.feat)])};
  endfunction

  // output side: match each packet with the next expected one of that header
  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    exp_t e;
    received++;
    while (exp_q.size() > 0 && exp_q[0].h !== out_pkt.hdr) begin
      void'(exp_q.pop_front());
      skipped++;
    end
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected packet");
    end else begin
      e = exp_q.pop_front();
      last_lat = cyc - e.c;
      if (out_pkt.tag !== e.tag) begin
        failures++;
        if (failures < 10) $display("phase %0d: tag %h want %h", phase, out_pkt.tag, e.tag);
      end
    end
  end

  task automatic send(int n, int load_pct);
    for (int i = 0; i < n; i++) begin
      pkind_e k; win_t w; phv_t p; exp_t e;
      rand_pkt(k, w, p);
      if ($urandom_range(0, 3) == 0)
        for (int f = int'(F_SPORT); f < int'(N_FEAT); f++) p.feat[f] = 16'($urandom);
      if (p.ipv4) begin
        // rebuild the window so that the random feature values are in it
        bit [5:0] fl = {p.feat[F_ACK][0], p.feat[F_SYN][0], p.feat[F_PSH][0],
                        p.feat[F_ECE][0], p.feat[F_RST][0], p.feat[F_FIN][0]};
        int sp = int'(p.feat[F_SPORT]), dp = int'(p.feat[F_DPORT]), len = int'(p.feat[F_LEN]);
        w = make_pkt(k, sp, dp, fl, len);
        p = expect_phv(k, sp, dp, fl, len);
      end
      @(negedge clk);
      in_valid = ($urandom_range(0, 99) < load_pct);
      in_hdr = w;
      if (phase == 3) out_ready = ($urandom_range(0, 2) == 0);
      e.h = w; e.tag = expect_tag(p); e.c = cyc;
      if (in_valid) exp_q.push_back(e);
    end
    @(negedge clk) begin in_valid = 0; out_ready = 1; end
    repeat (40) @(negedge clk);
  endtask

  task automatic program_tables(stage_e stg);
    cfg_wr_t wr[$];
    if (stg == STG_INGRESS) begin
      for (int t = 0; t < 3; t++) code_writes(rf[t], t, STG_INGRESS, 0, wr);
      for (int f = 0; f < int'(N_FEAT); f++) feature_writes(rf, f, STG_INGRESS, 0, wr);
    end else begin
      for (int g = 0; g < 5; g++) begin
        dtree one[$];
        one.push_back(dts[g]);
        code_writes(dts[g], 0, STG_EGRESS, g, wr);
        for (int f = 0; f < int'(N_FEAT); f++) feature_writes(one, f, STG_EGRESS, g, wr);
      end
    end
    foreach (wr[i]) begin @(negedge clk) cfg = wr[i]; end
    @(negedge clk) cfg = '0;
  endtask

  initial begin
    static int depth[5] = '{10, 6, 8, 10, 4};
    for (int t = 0; t < 3; t++) begin
      dtree d;
      d = new();
      d.build(10, 0, 5, 128);
      rf.push_back(d);
    end
    for (int g = 0; g < 5; g++) begin
      dts[g] = new();
      dts[g].build(depth[g], grp_first(g), grp_size(g), 128);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    phase = 0; send(200, 60);
    phase = 1; program_tables(STG_INGRESS); send(300, 60);
    phase = 2; program_tables(STG_EGRESS);
    // lone packet: latency
    send(1, 100);
    checks++;
    if (last_lat != 10) begin failures++; $display("latency %0d", last_lat); end
    send(2000, 90);
    checks++;
    if (skipped != 0) begin failures++; $display("drops without backpressure"); end
    phase = 3; send(2000, 90);
    checks++;
    if (exp_q.size() != 0 || skipped != int'(tm_drop_count)) begin
      failures++;
      $display("left %0d skipped %0d dropped %0d", exp_q.size(), skipped, tm_drop_count);
    end
    $display("received %0d: bypass %0d tie %0d s1_miss %0d s2_miss %0d stall %0d drop %0d",
             received, n_bypass, n_tie, n_s1, n_s2, n_stall, n_drop);
    checks += 6;
    if (n_bypass == 0) failures++;
    if (n_tie == 0)    failures++;
    if (n_s1 == 0)     failures++;
    if (n_s2 == 0)     failures++;
    if (n_stall == 0)  failures++;
    if (n_drop == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
