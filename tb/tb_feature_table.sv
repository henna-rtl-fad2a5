// tb_feature_table: random interval tables, including overlapping and
// invalidated entries, checked against a scan of a copy of the entries
// (lowest matching index wins, miss -> code 0).
module tb_feature_table;
  import henna_pkg::*;
  localparam int DEPTH = 64, CW = 48;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_valid = 0;
  logic [5:0] wr_addr = '0;
  feat_t wr_lo = '0, wr_hi = '0, key = '0;
  logic [CW-1:0] wr_code = '0, code;
  logic hit;
  int checks = 0, failures = 0;

  feature_table #(.DEPTH(DEPTH), .CW(CW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit         m_v [DEPTH];
  int         m_lo[DEPTH], m_hi[DEPTH];
  logic [CW-1:0] m_c[DEPTH];

  task automatic wr(int a, bit v, int lo, int hi, logic [CW-1:0] c);
    @(negedge clk);
    wr_en = 1; wr_addr = 6'(a); wr_valid = v; wr_lo = 16'(lo); wr_hi = 16'(hi); wr_code = c;
    @(negedge clk) wr_en = 0;
    m_v[a] = v; m_lo[a] = lo; m_hi[a] = hi; m_c[a] = c;
  endtask

  task automatic probe(int k);
    bit eh = 0; logic [CW-1:0] ec = '0;
    for (int i = 0; i < DEPTH; i++)
      if (m_v[i] && k >= m_lo[i] && k <= m_hi[i] && !eh) begin eh = 1; ec = m_c[i]; end
    @(negedge clk) key = 16'(k);
    #1;
    checks++;
    if (hit !== eh || code !== ec) begin
      failures++;
      if (failures < 10) $display("key %0d: got hit %0d code %h, want %0d %h", k, hit, code, eh, ec);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) m_v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    probe(100);                                   // empty table misses
    // a partition of the range into 40 intervals, in scrambled slots
    begin
      automatic int lo = 0;
      int slot[DEPTH];
      for (int i = 0; i < DEPTH; i++) slot[i] = i;
      slot.shuffle();
      for (int i = 0; i < 40; i++) begin
        automatic int hi = (i == 39) ? 65535 : lo + $urandom_range(0, 3000);
        wr(slot[i], 1, lo, hi, CW'({$urandom, $urandom}));
        lo = hi + 1;
      end
    end
    for (int n = 0; n < 1500; n++) probe($urandom_range(0, 65535));
    // overlaps and holes: priority by index
    for (int n = 0; n < 30; n++) begin
      automatic int a = $urandom_range(0, 65535), b = $urandom_range(0, 65535);
      wr($urandom_range(0, DEPTH - 1), $urandom_range(0, 3) != 0, a < b ? a : b, a < b ? b : a,
         CW'({$urandom, $urandom}));
    end
    for (int n = 0; n < 1500; n++) probe($urandom_range(0, 65535));
    for (int i = 0; i < DEPTH; i++) if (m_v[i]) begin probe(m_lo[i]); probe(m_hi[i]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
