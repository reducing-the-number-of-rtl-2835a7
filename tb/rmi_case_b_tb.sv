// rmi_case_b_tb: self-checking test of the Case B RMI unit.
//
// The testbench plays the out-of-order core: four base registers with known
// values, a random stream of loads and stores on them (2 offsets), address
// generation for the loads that received an entry (written back after a
// random delay, in any order), a CDB that delivers late store data, and a
// store buffer with random ready. Every store that the unit sends to the
// Special Store Reservation Station must later leave it with its own true
// address (taken from the matching load), its data and its ROB ID;
// stores leave the station out of order, so they are matched by ROB ID.
// Loads must always issue normally and stores never take an entry. A
// directed start checks the Store-After-Load case, including a second store
// to the same reference, which must issue normally while the Process Bit is
// set, and the one-cycle path from the load's address to the store buffer.
module rmi_case_b_tb;
  localparam int unsigned N = 4, RW = 6, OW = 4, AW = 16, DW = 16, RBW = 5, ID_W = 2;
  localparam int unsigned CYCLES = 4000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic dec_valid, dec_is_store, dec_data_rdy, dec_to_ssrs, dec_issue, iss_tag_valid;
  logic [RW-1:0] dec_base, dec_reg, cdb_tag, inv_reg;
  logic [OW-1:0] dec_off;
  logic [DW-1:0] dec_data, cdb_data, sb_data;
  logic [RBW-1:0] dec_rob, sb_rob;
  logic [ID_W-1:0] iss_tag_id, agu_id;
  logic agu_valid, cdb_valid, inv_en, sb_valid, sb_ready;
  logic [AW-1:0] agu_addr, sb_addr;

  rmi_case_b #(.ENTRIES(N), .REG_W(RW), .OFF_W(OW), .ADDR_W(AW), .DATA_W(DW), .ROB_W(RBW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  logic [AW-1:0] base_val [4];
  typedef struct { int unsigned id; logic [AW-1:0] addr; int wait_c; } agu_t;
  typedef struct { logic [RW-1:0] tag; logic [DW-1:0] data; int wait_c; } cdb_t;
  agu_t agu_q [$];
  cdb_t cdb_q [$];
  bit            exp_busy [32];
  logic [AW-1:0] exp_addr [32];
  logic [DW-1:0] exp_data [32];
  int n_ssrs = 0, n_st_plain = 0, n_ld = 0, n_ld_tag = 0, n_inv = 0, n_sb = 0, n_cdb_st = 0;
  int unsigned next_tag = 0, next_rob = 0;

  function automatic logic [AW-1:0] ea(int unsigned b, logic [OW-1:0] o);
    return base_val[b] + AW'($signed(o));
  endfunction

  task automatic idle();
    dec_valid = 0; dec_is_store = 0; dec_base = 0; dec_off = 0; dec_reg = 0;
    dec_data_rdy = 0; dec_data = 0; dec_rob = 0; inv_en = 0; inv_reg = 0;
  endtask

  task automatic step();
    int k;
    agu_valid = 0; agu_id = 0; agu_addr = 0;
    for (int i = 0; i < agu_q.size(); i++) if (agu_q[i].wait_c > 0) agu_q[i].wait_c--;
    k = -1;
    foreach (agu_q[i]) if (k < 0 && agu_q[i].wait_c == 0 && $urandom_range(0, 2) != 0) k = i;
    if (k >= 0) begin
      agu_valid = 1; agu_id = ID_W'(agu_q[k].id); agu_addr = agu_q[k].addr;
      agu_q.delete(k);
    end
    cdb_valid = 0; cdb_tag = 0; cdb_data = 0;
    for (int i = 0; i < cdb_q.size(); i++) if (cdb_q[i].wait_c > 0) cdb_q[i].wait_c--;
    k = -1;
    foreach (cdb_q[i]) if (k < 0 && cdb_q[i].wait_c == 0) k = i;
    if (k >= 0) begin
      cdb_valid = 1; cdb_tag = cdb_q[k].tag; cdb_data = cdb_q[k].data;
      cdb_q.delete(k);
    end
    #1;
    if (dec_valid) check(dec_to_ssrs ^ dec_issue, "exactly one destination");
    if (dec_valid && !dec_is_store) begin
      check(dec_issue, "loads always issue");
      n_ld++;
      if (iss_tag_valid) begin
        agu_q.push_back('{id: iss_tag_id, addr: ea(dec_base, dec_off), wait_c: $urandom_range(0, 6)});
        n_ld_tag++;
      end
    end
    if (dec_valid && dec_is_store) begin
      check(!iss_tag_valid, "stores take no entry");
      if (dec_to_ssrs) begin
        check(!exp_busy[dec_rob], "ROB ID free");
        exp_busy[dec_rob] = 1;
        exp_addr[dec_rob] = ea(dec_base, dec_off);
        exp_data[dec_rob] = dec_data;
        n_ssrs++;
      end else n_st_plain++;
    end
    if (sb_valid && sb_ready) begin
      check(exp_busy[sb_rob], "store buffer request with a known ROB ID");
      check(sb_addr == exp_addr[sb_rob] && sb_data == exp_data[sb_rob], "store address/data");
      exp_busy[sb_rob] = 0;
      n_sb++;
    end
    @(negedge clk);
  endtask

  task automatic store_fields();
    dec_rob = RBW'(next_rob % 32);
    next_rob++;
    if ($urandom_range(0, 1)) begin
      dec_data_rdy = 1; dec_data = DW'($urandom); dec_reg = RW'($urandom_range(8, 15));
    end else begin
      dec_data_rdy = 0; dec_data = DW'($urandom);
      dec_reg = RW'(32 + next_tag % 32);
      next_tag++;
      cdb_q.push_back('{tag: dec_reg, data: dec_data, wait_c: $urandom_range(0, 5)});
      n_cdb_st++;
    end
  endtask

  initial begin
    repeat (CYCLES + 400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int unsigned tid;
    for (int b = 0; b < 4; b++) base_val[b] = AW'(16'h1000 * (b + 1));
    for (int i = 0; i < 32; i++) exp_busy[i] = 0;
    idle(); agu_valid = 0; agu_id = 0; agu_addr = 0; cdb_valid = 0; cdb_tag = 0; cdb_data = 0;
    sb_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- directed: load 8(R1); store 8(R1); store 8(R1) again ----
    idle(); dec_valid = 1; dec_base = 1; dec_off = 8; dec_reg = 6;
    #1 check(dec_issue && iss_tag_valid, "load issues and opens an entry");
    tid = iss_tag_id;
    @(posedge clk); @(negedge clk);
    idle(); dec_valid = 1; dec_is_store = 1; dec_base = 1; dec_off = 8;
    dec_data_rdy = 1; dec_data = 16'h0055; dec_rob = 3;
    #1 check(dec_to_ssrs && !dec_issue, "store after load goes to the SS RS");
    @(posedge clk); @(negedge clk);
    idle(); dec_valid = 1; dec_is_store = 1; dec_base = 1; dec_off = 8;
    dec_data_rdy = 1; dec_data = 16'h0066; dec_rob = 4;
    #1 check(dec_issue && !dec_to_ssrs, "second store issues normally (Process Bit set)");
    @(posedge clk); @(negedge clk);
    idle(); agu_valid = 1; agu_id = ID_W'(tid); agu_addr = ea(1, 8);
    #1 check(!sb_valid, "store waits for the load's address");
    @(posedge clk); @(negedge clk);
    agu_valid = 0;
    #1 check(sb_valid && sb_addr == ea(1, 8) && sb_data == 16'h0055 && sb_rob == 3,
             "store leaves the cycle after the address arrives");
    @(posedge clk); @(negedge clk);
    idle(); dec_valid = 1; dec_is_store = 1; dec_base = 1; dec_off = 8;
    dec_data_rdy = 1; dec_data = 16'h0077; dec_rob = 5;
    #1 check(dec_issue && !dec_to_ssrs, "entry closed once its store has left");
    @(posedge clk); @(negedge clk);
    next_rob = 8;

    // ---- random phase ----
    for (int c = 0; c < CYCLES; c++) begin
      idle();
      sb_ready = ($urandom_range(0, 9) < 6);
      if ($urandom_range(0, 29) == 0) begin
        inv_en = 1; inv_reg = RW'($urandom_range(0, 3));
        base_val[inv_reg] = AW'($urandom);
        n_inv++;
      end
      if ($urandom_range(0, 9) < 7) begin
        dec_valid = 1;
        dec_is_store = $urandom_range(0, 1);
        do dec_base = RW'($urandom_range(0, 3)); while (inv_en && dec_base == inv_reg);
        dec_off = OW'($urandom_range(0, 1) ? 4'd8 : 4'hC);
        if (dec_is_store) store_fields();
        else dec_reg = RW'($urandom_range(8, 31));
      end
      step();
    end
    idle(); sb_ready = 1;
    for (int c = 0; c < 200; c++) step();
    begin
      int left = 0;
      for (int i = 0; i < 32; i++) left += exp_busy[i];
      check(left == 0, "every SS RS store reached the store buffer");
    end
    check(n_ssrs > 100, "stores sent to the SS RS");
    check(n_st_plain > 100, "stores issued normally");
    check(n_ld_tag > 100 && n_inv > 20 && n_cdb_st > 100, "entries, invalidations and CDB data exercised");
    $display("loads=%0d tagged=%0d ssrs_stores=%0d plain_stores=%0d sb=%0d inv=%0d",
             n_ld, n_ld_tag, n_ssrs, n_st_plain, n_sb, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
