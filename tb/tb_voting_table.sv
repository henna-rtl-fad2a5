// tb_voting_table: random votes of 3 trees over few classes (so that
// majorities and ties both occur), checked against henna_tb_pkg::vote_ref,
// which counts votes per class; plus directed cases.
module tb_voting_table;
  import henna_pkg::*;
  import henna_tb_pkg::*;
  localparam int T = 3;
  logic [T-1:0] in_valid;
  class_t in_class[T];
  cert_t  in_cert[T];
  logic valid, tie;
  class_t cls;
  int checks = 0, failures = 0, ties = 0, majorities = 0;

  voting_table #(.TREES(T)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit v[3], int c[3], int e[3]);
    int qc[$], qe[$]; bit qv[$];
    bit ev, et; int ecls;
    for (int t = 0; t < T; t++) begin
      in_valid[t] = v[t]; in_class[t] = class_t'(c[t]); in_cert[t] = cert_t'(e[t]);
      qc.push_back(c[t]); qe.push_back(e[t]); qv.push_back(v[t]);
    end
    vote_ref(qc, qe, qv, ev, ecls, et);
    #1;
    checks++;
    if (valid !== ev || tie !== et || (ev && int'(cls) != ecls)) begin
      failures++;
      if (failures < 10) $display("v=%p c=%p e=%p: got %0d %0d %0d want %0d %0d %0d",
                                  v, c, e, valid, cls, tie, ev, ecls, et);
    end
    if (et) ties++; else if (ev) majorities++;
  endtask

  initial begin
    // directed: 2-of-3 majority beats higher certainty
    run('{1, 1, 1}, '{2, 2, 4}, '{10, 10, 250});
    if (cls != 2) failures++;
    checks++;
    // three-way tie: highest certainty wins
    run('{1, 1, 1}, '{1, 3, 4}, '{10, 200, 20});
    if (cls != 3) failures++;
    checks++;
    // no vote
    run('{0, 0, 0}, '{1, 3, 4}, '{10, 200, 20});
    for (int n = 0; n < 5000; n++) begin
      bit v[3]; int c[3], e[3];
      for (int t = 0; t < T; t++) begin
        v[t] = $urandom_range(0, 5) != 0;
        c[t] = $urandom_range(0, 4);
        e[t] = $urandom_range(0, 3) * 60;
      end
      run(v, c, e);
    end
    checks++;
    if (ties == 0 || majorities == 0) failures++;
    $display("ties %0d majorities %0d", ties, majorities);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
