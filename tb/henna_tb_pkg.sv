// henna_tb_pkg: test-side model of the classifier, used by the testbenches.
//
// - dtree: a random decision tree over the nine features, built breadth first
//   with a per-node feasible range per feature, evaluated by walking it
//   (the reference the hardware is checked against);
// - table generation: from a set of trees, the feature-table intervals and
//   codes and the ternary code-table entries, produced the way a controller
//   would, as cfg_wr_t writes;
// - packet construction: Ethernet/IPv4/TCP-UDP header windows from chosen
//   feature values, so expected features are known without parsing;
// - vote_ref: majority vote with certainty tie-break.
package henna_tb_pkg;
  import henna_pkg::*;

  localparam int MAXN = 255;

  // device classes of each group: 4, 3, 6, 6 and 2 classes (21 in all)
  function automatic int grp_first(int g);
    int f[6] = '{0, 4, 7, 13, 19, 21};
    return f[g];
  endfunction
  function automatic int grp_size(int g);
    return grp_first(g + 1) - grp_first(g);
  endfunction

  class dtree;
    int n;
    int feat[MAXN], thr[MAXN], lft[MAXN], rgt[MAXN], par[MAXN], dir[MAXN];
    bit leaf[MAXN];
    int cls[MAXN], cert[MAXN], bitidx[MAXN];
    int rlo[MAXN][N_FEAT], rhi[MAXN][N_FEAT], dep[MAXN];
    int nbits[N_FEAT];

    // classes drawn from [cls_lo, cls_lo+ncls)
    function void build(int max_depth, int cls_lo, int ncls, int max_leaves);
      int q[$];
      int leaves;
      n = 1; leaves = 1;
      for (int f = 0; f < N_FEAT; f++) begin
        nbits[f] = 0; rlo[0][f] = 0;
        rhi[0][f] = (f <= int'(F_FIN)) ? 1 : 65535;
      end
      par[0] = -1; dir[0] = 0; dep[0] = 0;
      q.push_back(0);
      while (q.size() > 0) begin
        int i, cand[$], f, t;
        i = q.pop_front();
        for (int k = 0; k < N_FEAT; k++)
          if (rlo[i][k] < rhi[i][k] && nbits[k] < int'(CODE_W)) cand.push_back(k);
        if (dep[i] >= max_depth || cand.size() == 0 || leaves >= max_leaves || n + 2 > MAXN ||
            (dep[i] >= 2 && $urandom_range(0, 4) == 0)) begin
          leaf[i] = 1;
          cls[i]  = cls_lo + $urandom_range(0, ncls - 1);
          cert[i] = $urandom_range(1, 255);
          continue;
        end
        f = cand[$urandom_range(0, cand.size() - 1)];
        // keep some thresholds inside the range the packets use
        if (f == int'(F_LEN) && rlo[i][f] < 1400 && rhi[i][f] > 40 && $urandom_range(0, 3) != 0)
          t = $urandom_range((rlo[i][f] > 40 ? rlo[i][f] : 40), (rhi[i][f] - 1 < 1400 ? rhi[i][f] - 1 : 1400));
        else
          t = $urandom_range(rlo[i][f], rhi[i][f] - 1);
        leaf[i] = 0; feat[i] = f; thr[i] = t; bitidx[i] = nbits[f]; nbits[f]++;
        lft[i] = n; rgt[i] = n + 1; leaves++;
        for (int c = 0; c < 2; c++) begin
          int j = n + c;
          for (int k = 0; k < N_FEAT; k++) begin rlo[j][k] = rlo[i][k]; rhi[j][k] = rhi[i][k]; end
          if (c == 0) rhi[j][f] = t; else rlo[j][f] = t + 1;
          par[j] = i; dir[j] = c; dep[j] = dep[i] + 1;
          q.push_back(j);
        end
        n += 2;
      end
    endfunction

    function int eval_leaf(feat_vec_t fv);
      int i = 0;
      while (!leaf[i]) i = (int'(fv[feat[i]]) > thr[i]) ? rgt[i] : lft[i];
      return i;
    endfunction

    function int num_leaves();
      int c = 0;
      for (int i = 0; i < n; i++) if (leaf[i]) c++;
      return c;
    endfunction

    // ternary code-table entry of leaf i
    function void leaf_entry(int i, output logic [KEY_W-1:0] value, output logic [KEY_W-1:0] mask);
      int j = i;
      value = '0; mask = '0;
      while (par[j] >= 0) begin
        int p = par[j];
        int b = feat[p] * int'(CODE_W) + bitidx[p];
        mask[b]  = 1'b1;
        value[b] = dir[j][0];
        j = p;
      end
    endfunction
  endclass

  // feature-table writes of feature f for trees ts (tree k codes at k*CODE_W)
  function automatic void feature_writes(dtree ts[$], int f, stage_e stg, int grp,
                                         ref cfg_wr_t wr[$]);
    int th[$];
    int lo, k;
    for (int t = 0; t < ts.size(); t++)
      for (int i = 0; i < ts[t].n; i++)
        if (!ts[t].leaf[i] && ts[t].feat[i] == f) th.push_back(ts[t].thr[i]);
    th.sort();
    lo = 0; k = 0;
    for (int s = 0; s <= th.size(); s++) begin
      int hi;
      cfg_wr_t w;
      if (s < th.size() && s > 0 && th[s] == th[s-1]) continue;
      hi = (s < th.size()) ? th[s] : 65535;
      w = '0;
      w.we = 1'b1; w.stage = stg; w.kind = TBL_FEATURE; w.group = GROUP_W'(grp);
      w.idx = 4'(f); w.addr = CFG_AW'(k); w.valid = 1'b1;
      w.lo = FEAT_W'(lo); w.hi = FEAT_W'(hi);
      for (int t = 0; t < ts.size(); t++)
        for (int i = 0; i < ts[t].n; i++)
          if (!ts[t].leaf[i] && ts[t].feat[i] == f)
            w.code[t * int'(CODE_W) + ts[t].bitidx[i]] = (lo > ts[t].thr[i]);
      wr.push_back(w);
      k++;
      lo = hi + 1;
    end
  endfunction

  function automatic void code_writes(dtree tr, int tree_idx, stage_e stg, int grp,
                                      ref cfg_wr_t wr[$]);
    int k = 0;
    for (int i = 0; i < tr.n; i++) begin
      if (tr.leaf[i]) begin
        cfg_wr_t w = '0;
        logic [KEY_W-1:0] v, m;
        tr.leaf_entry(i, v, m);
        w.we = 1'b1; w.stage = stg; w.kind = TBL_CODE; w.group = GROUP_W'(grp);
        w.idx = 4'(tree_idx); w.addr = CFG_AW'(k); w.valid = 1'b1;
        w.value = v; w.mask = m; w.cls = class_t'(tr.cls[i]); w.cert = cert_t'(tr.cert[i]);
        wr.push_back(w);
        k++;
      end
    end
  endfunction

  // majority vote; ties -> highest certainty; then lowest tree index
  function automatic void vote_ref(int ncls[$], int ncert[$], bit nvalid[$],
                                   output bit valid, output int cls, output bit tie);
    int cnt[32], best[32], bv, bc;
    valid = 0; cls = 0; tie = 0; bv = 0; bc = -1;
    for (int c = 0; c < 32; c++) begin cnt[c] = 0; best[c] = 0; end
    for (int t = 0; t < ncls.size(); t++)
      if (nvalid[t]) begin
        cnt[ncls[t]]++;
        if (ncert[t] > best[ncls[t]]) best[ncls[t]] = ncert[t];
      end
    for (int t = 0; t < ncls.size(); t++)
      if (nvalid[t]) begin
        int c = ncls[t];
        if (!valid || cnt[c] > bv || (cnt[c] == bv && best[c] > bc)) begin
          valid = 1; cls = c; bv = cnt[c]; bc = best[c];
        end
      end
    for (int c = 0; c < 32; c++) if (valid && c != cls && cnt[c] == bv) tie = 1;
  endfunction

  // ---------------- packet construction ----------------
  typedef enum int {K_TCP, K_UDP, K_ICMP, K_ARP, K_TCP_OPT, K_FRAG} pkind_e;

  // flags[5:0] = {ACK, SYN, PSH, ECE, RST, FIN} in feature order F_ACK..F_FIN
  function automatic win_t make_pkt(pkind_e k, int sport, int dport, bit [5:0] fl, int len);
    win_t w;
    int l4;
    for (int i = 0; i < int'(WIN_BYTES); i++) w[i] = 8'($urandom);
    {w[12], w[13]} = (k == K_ARP) ? 16'h0806 : 16'h0800;
    if (k == K_ARP) return w;
    w[14] = (k == K_TCP_OPT) ? 8'h47 : 8'h45;
    {w[16], w[17]} = 16'(len);
    {w[20], w[21]} = (k == K_FRAG) ? 16'h00b9 : 16'h4000;  // offset 185 or DF
    w[23] = (k == K_UDP) ? 8'd17 : (k == K_ICMP) ? 8'd1 : 8'd6;
    l4 = (k == K_TCP_OPT) ? 42 : 34;
    {w[l4], w[l4+1]}   = 16'(sport);
    {w[l4+2], w[l4+3]} = 16'(dport);
    if (k != K_UDP)
      w[l4+13] = {w[l4+13][7], fl[2], w[l4+13][5], fl[5], fl[3], fl[1], fl[4], fl[0]};
    return w;
  endfunction

  // the features a correct parser must return for make_pkt(k, ...)
  function automatic phv_t expect_phv(pkind_e k, int sport, int dport, bit [5:0] fl, int len);
    phv_t p = '0;
    if (k == K_ARP) return p;
    p.ipv4 = 1'b1;
    p.feat[F_LEN] = 16'(len);
    if (k == K_TCP || k == K_UDP || k == K_TCP_OPT) begin
      p.feat[F_SPORT] = 16'(sport);
      p.feat[F_DPORT] = 16'(dport);
    end
    if (k == K_TCP || k == K_TCP_OPT) begin
      p.feat[F_ACK] = 16'(fl[5]); p.feat[F_SYN] = 16'(fl[4]); p.feat[F_PSH] = 16'(fl[3]);
      p.feat[F_ECE] = 16'(fl[2]); p.feat[F_RST] = 16'(fl[1]); p.feat[F_FIN] = 16'(fl[0]);
    end
    return p;
  endfunction

  // a random packet of a random kind, mostly TCP/UDP
  function automatic void rand_pkt(output pkind_e k, output win_t w, output phv_t p);
    int r = $urandom_range(0, 99);
    int sp, dp, len;
    bit [5:0] fl;
    int ports[6] = '{80, 443, 53, 123, 1900, 8080};
    k = (r < 50) ? K_TCP : (r < 80) ? K_UDP : (r < 86) ? K_ICMP :
        (r < 92) ? K_ARP : (r < 96) ? K_TCP_OPT : K_FRAG;
    sp  = ($urandom_range(0, 1) != 0) ? ports[$urandom_range(0, 5)] : $urandom_range(1024, 65535);
    dp  = ($urandom_range(0, 1) != 0) ? ports[$urandom_range(0, 5)] : $urandom_range(1024, 65535);
    len = $urandom_range(40, 1500);
    fl  = 6'($urandom);
    w = make_pkt(k, sp, dp, fl, len);
    p = expect_phv(k, sp, dp, fl, len);
  endfunction

endpackage
