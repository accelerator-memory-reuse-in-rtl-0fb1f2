// Testbench of cm_tag_array: random lookups, fills and touches on a small
// array (8 sets x 4 ways) against an independent model of the tags and of
// true-LRU order; checks hit, hit way, victim choice (invalid first, then
// least recently used) and the state of every way.
module tb_cm_tag_array;
  localparam int SETS = 8, WAYS = 4, TW = 6;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic rd_en, hit, victim_valid, victim_dirty, upd_en, upd_valid, upd_dirty, upd_touch, clr_en;
  logic [2:0] rd_set, clr_set;
  logic [TW-1:0] rd_tag, victim_tag, upd_tag;
  logic [1:0] hit_way, victim_way, upd_way;
  logic way_valid[WAYS], way_dirty[WAYS];
  logic [TW-1:0] way_tag[WAYS];

  cm_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TW)) dut (.*);

  // model: order[s] lists ways from most to least recently used
  logic          m_v [SETS][WAYS];
  logic          m_d [SETS][WAYS];
  logic [TW-1:0] m_t [SETS][WAYS];
  int            m_age [SETS][WAYS];

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n_hit = 0, n_evict = 0;
    rd_en = 0; upd_en = 0; clr_en = 0; rd_set = 0; rd_tag = 0; upd_way = 0; upd_valid = 0;
    upd_dirty = 0; upd_tag = 0; upd_touch = 0; clr_set = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < SETS; s++) begin
      @(negedge clk); clr_en = 1; clr_set = 3'(s);
      for (int w = 0; w < WAYS; w++) begin m_v[s][w] = 0; m_d[s][w] = 0; m_t[s][w] = 0; m_age[s][w] = w; end
    end
    @(negedge clk); clr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      automatic int s = $urandom_range(SETS-1);
      automatic logic [TW-1:0] tg = TW'($urandom_range(7));   // few tags: hits and evictions
      automatic int eh = -1, ev = -1;
      @(negedge clk); rd_en = 1; rd_set = 3'(s); rd_tag = tg;
      @(negedge clk); rd_en = 0;
      // expected
      for (int w = 0; w < WAYS; w++) if (eh < 0 && m_v[s][w] && m_t[s][w] == tg) eh = w;
      for (int w = 0; w < WAYS; w++) if (ev < 0 && !m_v[s][w]) ev = w;
      if (ev < 0) for (int w = 0; w < WAYS; w++) if (m_age[s][w] == WAYS-1) ev = w;
      checks++;
      if (hit !== (eh >= 0) || (eh >= 0 && hit_way !== 2'(eh))) begin
        failures++; $display("t=%0d hit %b/%0d expected %0d", t, hit, hit_way, eh);
      end
      checks++;
      if (victim_way !== 2'(ev) || victim_valid !== m_v[s][ev] || victim_dirty !== m_d[s][ev] ||
          (m_v[s][ev] && victim_tag !== m_t[s][ev])) begin
        failures++; $display("t=%0d victim %0d expected %0d", t, victim_way, ev);
      end
      for (int w = 0; w < WAYS; w++) begin
        checks++;
        if (way_valid[w] !== m_v[s][w] || (m_v[s][w] && (way_dirty[w] !== m_d[s][w] || way_tag[w] !== m_t[s][w])))
          failures++;
      end
      // update: hit -> touch (maybe dirty), miss -> fill victim
      begin
        automatic int w = (eh >= 0) ? eh : ev;
        automatic logic d = $urandom_range(1);
        if (eh >= 0) n_hit++; else if (m_v[s][ev]) n_evict++;
        upd_en = 1; upd_way = 2'(w); upd_valid = 1; upd_dirty = d; upd_tag = tg; upd_touch = 1;
        for (int k = 0; k < WAYS; k++) if (m_age[s][k] < m_age[s][w]) m_age[s][k]++;
        m_age[s][w] = 0; m_v[s][w] = 1; m_d[s][w] = d; m_t[s][w] = tg;
        @(negedge clk); upd_en = 0;
      end
    end
    checks++;
    if (n_hit == 0 || n_evict == 0) begin failures++; $display("no hits or no evictions"); end
    $display("hits %0d evictions %0d", n_hit, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
