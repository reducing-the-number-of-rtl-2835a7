// rmi_sfc_tb: self-checking test of the Store Forward Control queue.
//
// The testbench plays the Generated Address Cache (addresses with Valid
// Bits), the Common Data Bus (random broadcasts of register tag and value)
// and the store buffer (random sb_ready). Eliminated stores are pushed with
// their value present or with the tag of the register that will produce it.
// A model FIFO tracks each store's value, capturing CDB broadcasts (also in
// the cycle of the push), and predicts when the head store may leave and
// with which address and data. A directed case checks that a value waiting
// on the CDB is captured and the store leaves the cycle after.
module rmi_sfc_tb;
  localparam int unsigned D = 4, N = 4, RW = 3, AW = 16, DW = 16, ID_W = 2, CYCLES = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push_en, push_rdy, full, cdb_valid, gac_rd_valid, sb_valid, sb_ready, rel_en;
  logic [ID_W-1:0] push_id, gac_rd_id, rel_id;
  logic [RW-1:0] push_tag, cdb_tag;
  logic [DW-1:0] push_data, cdb_data, sb_data;
  logic [AW-1:0] gac_rd_addr, sb_addr;

  rmi_sfc #(.DEPTH(D), .ENTRIES(N), .REG_W(RW), .ADDR_W(AW), .DATA_W(DW)) dut (.*);

  logic [AW-1:0] g_addr [N];
  bit            g_valid [N];
  assign gac_rd_valid = g_valid[gac_rd_id];
  assign gac_rd_addr  = g_addr[gac_rd_id];

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  typedef struct { int unsigned id; bit rdy; int unsigned tag; logic [DW-1:0] val; } st_t;
  st_t mq [$];
  int n_pop = 0, n_cdb = 0;

  function automatic bit in_queue(int unsigned k);
    foreach (mq[i]) if (mq[i].id == k) return 1;
    return 0;
  endfunction

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    bit exp_valid;
    for (int i = 0; i < N; i++) begin g_valid[i] = 0; g_addr[i] = AW'(16'h2000 + i * 4); end
    push_en = 0; push_id = 0; push_rdy = 0; push_data = 0; push_tag = 0;
    cdb_valid = 0; cdb_tag = 0; cdb_data = 0; sb_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Directed: value comes over the CDB two cycles after the push.
    @(negedge clk);
    g_valid[1] = 1; sb_ready = 1;
    push_en = 1; push_id = 1; push_rdy = 0; push_tag = 5;
    @(negedge clk);
    push_en = 0;
    #1 check(!sb_valid, "store waits for its value");
    @(negedge clk);
    cdb_valid = 1; cdb_tag = 5; cdb_data = 16'hBEEF;
    #1 check(!sb_valid, "value not yet captured");
    @(negedge clk);
    cdb_valid = 0;
    #1 check(sb_valid && sb_data == 16'hBEEF && sb_addr == g_addr[1] && rel_en && rel_id == 1,
             "store leaves the cycle after the CDB broadcast");
    @(negedge clk);
    g_valid[1] = 0;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      if ($urandom_range(0, 9) < 2) begin
        int unsigned k;
        k = $urandom_range(0, N-1);
        // a slot referenced by a queued access keeps its address (the DLT
        // cannot reassign an entry whose Process Counter is not zero)
        if (!g_valid[k]) g_valid[k] = 1;
        else if (!in_queue(k)) begin
          g_valid[k] = 0;
          g_addr[k]  = AW'($urandom);
        end
      end
      push_en   = (mq.size() < D) && ($urandom_range(0, 9) < 5);
      push_id   = ID_W'($urandom_range(0, N-1));
      if (!g_valid[push_id] && $urandom_range(0, 1) == 1) push_en = 0;
      push_rdy  = ($urandom_range(0, 2) == 0);
      push_data = DW'($urandom);
      push_tag  = RW'($urandom);
      cdb_valid = ($urandom_range(0, 9) < 4);
      cdb_tag   = RW'($urandom);
      cdb_data  = DW'($urandom);
      sb_ready  = ($urandom_range(0, 9) < 7);
      #1;
      check(full == (mq.size() == D), "full");
      exp_valid = mq.size() > 0 && mq[0].rdy && g_valid[mq[0].id];
      check(sb_valid == exp_valid, "sb_valid");
      if (exp_valid) begin
        check(sb_addr == g_addr[mq[0].id] && sb_data == mq[0].val, "sb_addr/sb_data");
        check(rel_en == sb_ready && rel_id == ID_W'(mq[0].id), "release");
      end else check(!rel_en, "no release");
      @(posedge clk);
      if (exp_valid && sb_ready) begin void'(mq.pop_front()); n_pop++; end
      foreach (mq[i])
        if (cdb_valid && !mq[i].rdy && mq[i].tag == cdb_tag) begin
          mq[i].rdy = 1; mq[i].val = cdb_data; n_cdb++;
        end
      if (push_en) begin
        st_t s;
        s.id = push_id; s.tag = push_tag;
        if (push_rdy) begin s.rdy = 1; s.val = push_data; end
        else if (cdb_valid && cdb_tag == push_tag) begin s.rdy = 1; s.val = cdb_data; n_cdb++; end
        else begin s.rdy = 0; s.val = 0; end
        mq.push_back(s);
      end
    end
    check(n_pop > 200 && n_cdb > 100, "forwarding and CDB capture exercised");
    $display("forwarded=%0d cdb_captures=%0d", n_pop, n_cdb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
