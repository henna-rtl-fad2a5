// tb_code_table: random ternary entries; keys built to hit a chosen entry
// (wildcard bits random) and fully random keys, checked against a scan of a
// copy of the entries (lowest matching index wins).
module tb_code_table;
  import henna_pkg::*;
  localparam int DEPTH = 128, KW = KEY_W;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_valid = 0;
  logic [6:0] wr_addr = '0;
  logic [KW-1:0] wr_value = '0, wr_mask = '0, key = '0;
  class_t wr_class = '0, cls;
  cert_t  wr_cert = '0, cert;
  logic hit;
  int checks = 0, failures = 0;

  code_table #(.DEPTH(DEPTH), .KW(KW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit m_v[DEPTH];
  logic [KW-1:0] m_val[DEPTH], m_msk[DEPTH];
  int m_cls[DEPTH], m_crt[DEPTH];

  function automatic logic [KW-1:0] rnd();
    logic [KW-1:0] r;
    for (int i = 0; i < KW; i += 32) r[i +: 16] = 16'($urandom);
    for (int i = 16; i < KW; i += 32) r[i +: 16] = 16'($urandom);
    return r;
  endfunction

  task automatic wr(int a, bit v);
    logic [KW-1:0] m = '0;
    int nb = $urandom_range(1, 12);
    for (int i = 0; i < nb; i++) m[$urandom_range(0, KW - 1)] = 1'b1;
    @(negedge clk);
    wr_en = 1; wr_addr = 7'(a); wr_valid = v; wr_value = rnd(); wr_mask = m;
    wr_class = class_t'($urandom); wr_cert = cert_t'($urandom);
    m_v[a] = v; m_val[a] = wr_value; m_msk[a] = m; m_cls[a] = int'(wr_class); m_crt[a] = int'(wr_cert);
    @(negedge clk) wr_en = 0;
  endtask

  task automatic probe(logic [KW-1:0] k);
    bit eh = 0; int ec = 0, et = 0;
    for (int i = 0; i < DEPTH; i++)
      if (!eh && m_v[i] && ((k ^ m_val[i]) & m_msk[i]) == '0) begin eh = 1; ec = m_cls[i]; et = m_crt[i]; end
    @(negedge clk) key = k;
    #1;
    checks++;
    if (hit !== eh || (eh && (int'(cls) != ec || int'(cert) != et))) begin
      failures++;
      if (failures < 10) $display("probe: got %0d %0d %0d want %0d %0d %0d", hit, cls, cert, eh, ec, et);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) m_v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    probe(rnd());
    for (int i = 0; i < DEPTH; i++) wr(i, $urandom_range(0, 7) != 0);
    for (int n = 0; n < 2000; n++) begin
      automatic int e = $urandom_range(0, DEPTH - 1);
      probe((rnd() & ~m_msk[e]) | (m_val[e] & m_msk[e]));
    end
    for (int n = 0; n < 500; n++) probe(rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
