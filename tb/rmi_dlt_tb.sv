// rmi_dlt_tb: self-checking test of the Dependence Lookup Table.
//
// A reference model of the table (match on base register and offset,
// Process Counter, LRU replacement that skips entries in use or pinned,
// invalidation by register and by mask) runs beside the DUT. Every cycle a
// random mix of lookup, allocation, counter increments and decrements,
// pins, invalidations and kills is applied, and the combinational lookup
// and victim outputs and the status vectors are compared with the model.
// A small key space (4 registers x 4 offsets) makes hits, full tables and
// evictions frequent. Directed cases at the start check the fill order and
// the LRU victim by hand.
module rmi_dlt_tb;
  localparam int unsigned N     = 4;
  localparam int unsigned REG_W = 3;
  localparam int unsigned OFF_W = 4;
  localparam int unsigned CNT_W = 2;
  localparam int unsigned ID_W  = 2;
  localparam int unsigned CYCLES = 4000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [REG_W-1:0] lk_reg, alloc_reg, inv_reg;
  logic [OFF_W-1:0] lk_off, alloc_off;
  logic lk_hit, lk_cnt_max, alloc_req, alloc_ok, inc_en, inv_en;
  logic [ID_W-1:0] lk_id, alloc_id, inc_id;
  logic [N-1:0] pinned, kill_mask, valid_o, busy_o;
  logic [1:0] dec_en;
  logic [1:0][ID_W-1:0] dec_id;

  rmi_dlt #(.ENTRIES(N), .REG_W(REG_W), .OFF_W(OFF_W), .CNT_W(CNT_W), .NDEC(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ---- reference model ----
  bit              m_valid [N];
  int unsigned     m_base [N], m_off [N], m_cnt [N];
  int unsigned     order [N];   // order[0] = most recently used
  int unsigned     n_hits = 0, n_evict = 0, n_full = 0;

  function automatic void m_touch(int unsigned e);
    int unsigned k = 0;
    for (int unsigned i = 0; i < N; i++) if (order[i] == e) k = i;
    for (int unsigned i = k; i > 0; i--) order[i] = order[i-1];
    order[0] = e;
  endfunction

  function automatic int m_lookup(int unsigned r, int unsigned o);
    for (int unsigned i = 0; i < N; i++)
      if (m_valid[i] && m_base[i] == r && m_off[i] == o) return int'(i);
    return -1;
  endfunction

  function automatic int m_victim(logic [N-1:0] pin);
    for (int unsigned i = 0; i < N; i++)
      if (!m_valid[i] && m_cnt[i] == 0 && !pin[i]) return int'(i);
    for (int i = N-1; i >= 0; i--)
      if (m_cnt[order[i]] == 0 && !pin[order[i]]) return int'(order[i]);
    return -1;
  endfunction

  task automatic idle();
    lk_reg = 0; lk_off = 0; alloc_req = 0; alloc_reg = 0; alloc_off = 0;
    pinned = 0; inc_en = 0; inc_id = 0; dec_en = 0; dec_id = '0;
    inv_en = 0; inv_reg = 0; kill_mask = 0;
  endtask

  // One cycle: drive at negedge (already done by caller), compare, update.
  task automatic step();
    int h, v;
    bit do_alloc;
    #1;
    h = m_lookup(lk_reg, lk_off);
    check(lk_hit == (h >= 0), "lk_hit");
    if (h >= 0) begin
      check(lk_id == ID_W'(h), "lk_id");
      check(lk_cnt_max == (m_cnt[h] == 3), "lk_cnt_max");
    end
    v = m_victim(pinned);
    do_alloc = alloc_req && v >= 0;
    check(alloc_ok == do_alloc, "alloc_ok");
    if (do_alloc) check(alloc_id == ID_W'(v), $sformatf("alloc_id %0d exp %0d", alloc_id, v));
    for (int unsigned i = 0; i < N; i++) begin
      check(valid_o[i] == m_valid[i], "valid_o");
      check(busy_o[i] == (m_cnt[i] != 0), "busy_o");
    end
    if (h >= 0) n_hits++;
    if (do_alloc && m_valid[v]) n_evict++;
    if (alloc_req && v < 0) n_full++;
    @(posedge clk);
    // model update
    if (inc_en) m_cnt[inc_id]++;
    for (int d = 0; d < 2; d++) if (dec_en[d]) m_cnt[dec_id[d]]--;
    for (int unsigned i = 0; i < N; i++)
      if (kill_mask[i] || (inv_en && m_base[i] == inv_reg)) m_valid[i] = 0;
    if (do_alloc) begin
      m_valid[v] = 1; m_base[v] = alloc_reg; m_off[v] = alloc_off;
      m_touch(v);
    end else if (inc_en) m_touch(inc_id);
    @(negedge clk);
  endtask

  initial begin
    repeat (CYCLES + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int unsigned r, o;
    for (int unsigned i = 0; i < N; i++) begin
      m_valid[i] = 0; m_base[i] = 0; m_off[i] = 0; m_cnt[i] = 0; order[i] = i;
    end
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Directed: fill the table; entries are taken in index order.
    for (int unsigned i = 0; i < N; i++) begin
      idle();
      lk_reg = REG_W'(i); lk_off = OFF_W'(i + 5);
      alloc_req = 1; alloc_reg = lk_reg; alloc_off = lk_off;
      #1 check(alloc_ok && alloc_id == ID_W'(i), "fill order");
      step();
    end
    // Use entry 0 once (inc then dec): entry 1 becomes least recently used.
    idle(); lk_reg = 0; lk_off = 5; #1 check(lk_hit && lk_id == 0, "hit entry 0");
    inc_en = 1; inc_id = 0; step();
    idle(); dec_en = 2'b01; dec_id[0] = 0; step();
    idle(); lk_reg = 7; lk_off = 9; alloc_req = 1; alloc_reg = 7; alloc_off = 9;
    #1 check(alloc_ok && alloc_id == 1, "LRU victim is entry 1");
    step();
    // Old reference in entry 1 is gone, new one is there.
    idle(); lk_reg = 1; lk_off = 6; #1 check(!lk_hit, "evicted reference misses");
    step();
    idle(); lk_reg = 7; lk_off = 9; #1 check(lk_hit && lk_id == 1, "new reference hits");
    step();
    // Invalidate register 7.
    idle(); inv_en = 1; inv_reg = 7; step();
    idle(); lk_reg = 7; lk_off = 9; #1 check(!lk_hit, "invalidated reference misses");
    step();

    // Random phase.
    for (int unsigned c = 0; c < CYCLES; c++) begin
      int h;
      idle();
      r = $urandom_range(0, 3); o = $urandom_range(0, 3);
      lk_reg = REG_W'(r); lk_off = OFF_W'(o);
      alloc_reg = lk_reg; alloc_off = lk_off;
      h = m_lookup(r, o);
      if (h < 0) alloc_req = ($urandom_range(0, 9) < 7);
      else if (m_cnt[h] < 3 && $urandom_range(0, 9) < 6) begin
        inc_en = 1; inc_id = ID_W'(h);
      end
      for (int d = 0; d < 2; d++) begin
        int unsigned e, used;
        e = $urandom_range(0, N-1);
        used = (d == 1 && dec_en[0] && dec_id[0] == ID_W'(e)) ? 1 : 0;
        if (m_cnt[e] > used && $urandom_range(0, 9) < 3) begin
          dec_en[d] = 1; dec_id[d] = ID_W'(e);
        end
      end
      if ($urandom_range(0, 9) < 2) pinned = N'($urandom);
      if ($urandom_range(0, 19) == 0) begin inv_en = 1; inv_reg = REG_W'($urandom_range(0, 3)); end
      if ($urandom_range(0, 29) == 0) kill_mask = N'(1 << $urandom_range(0, N-1));
      step();
    end
    check(n_hits > 100, "hits exercised");
    check(n_evict > 20, "LRU evictions exercised");
    check(n_full > 5, "table-full refusals exercised");
    $display("hits=%0d evictions=%0d refusals=%0d", n_hits, n_evict, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
