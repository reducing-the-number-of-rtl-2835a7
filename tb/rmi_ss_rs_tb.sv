// rmi_ss_rs_tb: self-checking test of the Special Store Reservation Station.
//
// A model of the entries (open, Valid Bit and Address, store present, ROB ID,
// Result Valid and Value or tag) runs beside the DUT. Random loads open idle
// entries, their addresses arrive later, stores enter open entries with
// their value or a producer tag, the Common Data Bus broadcasts random
// results and the store buffer accepts at random. Each cycle the model
// predicts which entry is dispatched (lowest ready index) with what address,
// data and ROB ID, and the pending vector. A directed case checks that a
// store whose address and value are present leaves in the next cycle.
module rmi_ss_rs_tb;
  localparam int unsigned N = 4, RW = 3, AW = 16, DW = 16, ROBW = 4, ID_W = 2, CYCLES = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic open_en, addr_en, st_en, st_rdy, cdb_valid, sb_valid, sb_ready, rel_en;
  logic [ID_W-1:0] open_id, addr_id, st_id, rel_id;
  logic [AW-1:0] addr, sb_addr;
  logic [ROBW-1:0] st_rob, sb_rob;
  logic [DW-1:0] st_data, cdb_data, sb_data;
  logic [RW-1:0] st_tag, cdb_tag;
  logic [N-1:0] pending_o;

  rmi_ss_rs #(.ENTRIES(N), .REG_W(RW), .ADDR_W(AW), .DATA_W(DW), .ROB_W(ROBW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  bit m_open [N], m_av [N], m_st [N], m_rdy [N];
  logic [AW-1:0] m_addr [N];
  logic [ROBW-1:0] m_rob [N];
  logic [RW-1:0] m_tag [N];
  logic [DW-1:0] m_val [N];
  int n_disp = 0, n_cdb = 0, n_stall = 0;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    open_en = 0; open_id = 0; addr_en = 0; addr_id = 0; addr = 0;
    st_en = 0; st_id = 0; st_rob = 0; st_rdy = 0; st_data = 0; st_tag = 0;
    cdb_valid = 0; cdb_tag = 0; cdb_data = 0; sb_ready = 1;
  endtask

  // Compare at #1 after negedge, then apply the model update at the posedge.
  task automatic step();
    int sel;
    #1;
    sel = -1;
    for (int i = 0; i < N; i++)
      if (sel < 0 && m_st[i] && m_rdy[i] && m_av[i]) sel = i;
    check(sb_valid == (sel >= 0), "sb_valid");
    if (sel >= 0) begin
      check(sb_addr == m_addr[sel] && sb_data == m_val[sel] && sb_rob == m_rob[sel], "sb payload");
      check(rel_en == sb_ready && rel_id == ID_W'(sel), "release");
    end else check(!rel_en, "no release");
    for (int i = 0; i < N; i++) check(pending_o[i] == (m_open[i] && !m_av[i]), "pending_o");
    if (sel >= 0 && !sb_ready) n_stall++;
    @(posedge clk);
    for (int i = 0; i < N; i++)
      if (cdb_valid && m_st[i] && !m_rdy[i] && m_tag[i] == cdb_tag) begin
        m_rdy[i] = 1; m_val[i] = cdb_data; n_cdb++;
      end
    if (addr_en) begin m_addr[addr_id] = addr; m_av[addr_id] = 1; end
    if (sel >= 0 && sb_ready) begin m_st[sel] = 0; m_open[sel] = 0; n_disp++; end
    if (st_en) begin
      m_st[st_id] = 1; m_rob[st_id] = st_rob; m_tag[st_id] = st_tag;
      if (st_rdy) begin m_rdy[st_id] = 1; m_val[st_id] = st_data; end
      else if (cdb_valid && cdb_tag == st_tag) begin m_rdy[st_id] = 1; m_val[st_id] = cdb_data; end
      else m_rdy[st_id] = 0;
    end
    if (open_en) begin m_open[open_id] = 1; m_av[open_id] = 0; m_st[open_id] = 0; end
    @(negedge clk);
  endtask

  initial begin : stim
    for (int i = 0; i < N; i++) begin
      m_open[i] = 0; m_av[i] = 0; m_st[i] = 0; m_rdy[i] = 0;
      m_addr[i] = 0; m_rob[i] = 0; m_tag[i] = 0; m_val[i] = 0;
    end
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Directed: load opens entry 3, address arrives, store enters with value.
    idle(); open_en = 1; open_id = 3; step();
    idle(); addr_en = 1; addr_id = 3; addr = 16'h0040; step();
    idle(); st_en = 1; st_id = 3; st_rob = 7; st_rdy = 1; st_data = 16'h1234;
    #1 check(!sb_valid, "store not yet in the station");
    step();
    idle();
    #1 check(sb_valid && sb_addr == 16'h0040 && sb_data == 16'h1234 && sb_rob == 7,
             "store leaves one cycle after entering");
    step();
    for (int c = 0; c < CYCLES; c++) begin
      int unsigned k;
      idle();
      k = $urandom_range(0, N-1);
      if ($urandom_range(0, 9) < 3 && !m_st[k] && !(m_open[k] && !m_av[k])) begin
        open_en = 1; open_id = ID_W'(k);
      end
      k = $urandom_range(0, N-1);
      if ($urandom_range(0, 9) < 4 && m_open[k] && !m_av[k] && !(open_en && open_id == ID_W'(k))) begin
        addr_en = 1; addr_id = ID_W'(k); addr = AW'($urandom);
      end
      k = $urandom_range(0, N-1);
      if ($urandom_range(0, 9) < 4 && m_open[k] && !m_st[k] && !(open_en && open_id == ID_W'(k))) begin
        st_en = 1; st_id = ID_W'(k); st_rob = ROBW'($urandom);
        st_rdy = ($urandom_range(0, 2) == 0); st_data = DW'($urandom); st_tag = RW'($urandom);
      end
      cdb_valid = ($urandom_range(0, 9) < 4); cdb_tag = RW'($urandom); cdb_data = DW'($urandom);
      sb_ready = ($urandom_range(0, 9) < 7);
      step();
    end
    check(n_disp > 100 && n_cdb > 50 && n_stall > 20, "dispatch, CDB capture and stalls exercised");
    $display("dispatched=%0d cdb_captures=%0d stalls=%0d", n_disp, n_cdb, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
