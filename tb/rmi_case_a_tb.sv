// rmi_case_a_tb: self-checking test of the Case A RMI unit.
//
// The testbench plays the out-of-order core around the unit. It keeps the
// values of four base registers and decodes a stream of loads and stores on
// them (2 offsets), so references repeat often. For every instruction it
// knows the true address (base value + sign-extended offset at decode).
//  * An issued instruction that received an Entry ID has its address
//    "generated" a random number of cycles later and written back (agu_*),
//    in any order.
//  * An eliminated load must later reach the load buffer with the true
//    address and its destination register; an eliminated store must reach
//    the store buffer with the true address and its data, which is either
//    given at decode or broadcast on the CDB some cycles later.
//  * Base registers change value now and then, with inv_en; stale addresses
//    would then show up as address mismatches.
// A directed start runs the counter-increment sequence: load x(R1) issues
// and gets an entry, store x(R1) is eliminated and reaches the store buffer
// one cycle after the load's address is generated. Counters make sure that
// eliminations of both kinds, fall-backs to normal issue, CDB captures and
// invalidations all happen, and that every eliminated access drains.
module rmi_case_a_tb;
  localparam int unsigned N = 4, D = 2, RW = 6, OW = 4, AW = 16, DW = 16, CW = 2, ID_W = 2;
  localparam int unsigned CYCLES = 4000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic dec_valid, dec_is_store, dec_data_rdy, dec_elim, dec_issue, iss_tag_valid;
  logic [RW-1:0] dec_base, dec_reg, cdb_tag, inv_reg, lb_reg;
  logic [OW-1:0] dec_off;
  logic [DW-1:0] dec_data, cdb_data, sb_data;
  logic [ID_W-1:0] iss_tag_id, agu_id;
  logic agu_valid, cdb_valid, inv_en, lb_valid, lb_ready, sb_valid, sb_ready;
  logic [AW-1:0] agu_addr, lb_addr, sb_addr;

  rmi_case_a #(.ENTRIES(N), .DEPTH(D), .REG_W(RW), .OFF_W(OW), .ADDR_W(AW),
               .DATA_W(DW), .CNT_W(CW)) dut (.*);

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
  typedef struct { logic [AW-1:0] addr; logic [RW-1:0] rd; } ld_t;
  typedef struct { logic [AW-1:0] addr; logic [DW-1:0] data; } st_t;
  typedef struct { logic [RW-1:0] tag; logic [DW-1:0] data; int wait_c; } cdb_t;
  agu_t agu_q [$];
  ld_t  ld_q [$];
  st_t  st_q [$];
  cdb_t cdb_q [$];
  int n_el_ld = 0, n_el_st = 0, n_tag = 0, n_plain = 0, n_inv = 0, n_cdb_st = 0;
  int n_lb = 0, n_sb = 0;
  int unsigned next_tag = 0;

  function automatic logic [AW-1:0] ea(int unsigned b, logic [OW-1:0] o);
    return base_val[b] + AW'($signed(o));
  endfunction

  task automatic idle();
    dec_valid = 0; dec_is_store = 0; dec_base = 0; dec_off = 0; dec_reg = 0;
    dec_data_rdy = 0; dec_data = 0; inv_en = 0; inv_reg = 0;
  endtask

  // Drive the environment for the current cycle (AGU, CDB), compare the
  // buffer outputs, then advance.
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
    if (dec_valid) check(dec_elim ^ dec_issue, "exactly one of eliminate / issue");
    if (dec_valid && dec_elim) begin
      check(!iss_tag_valid, "eliminated instruction takes no entry");
      if (dec_is_store) begin
        st_q.push_back('{addr: ea(dec_base, dec_off), data: dec_data});
        n_el_st++;
      end else begin
        ld_q.push_back('{addr: ea(dec_base, dec_off), rd: dec_reg});
        n_el_ld++;
      end
    end
    if (dec_valid && dec_issue) begin
      if (iss_tag_valid) begin
        agu_q.push_back('{id: iss_tag_id, addr: ea(dec_base, dec_off), wait_c: $urandom_range(0, 6)});
        n_tag++;
      end else n_plain++;
    end
    if (lb_valid && lb_ready) begin
      check(ld_q.size() > 0, "unexpected load buffer request");
      if (ld_q.size() > 0) begin
        check(lb_addr == ld_q[0].addr && lb_reg == ld_q[0].rd, "load buffer address/register");
        void'(ld_q.pop_front());
      end
      n_lb++;
    end
    if (sb_valid && sb_ready) begin
      check(st_q.size() > 0, "unexpected store buffer request");
      if (st_q.size() > 0) begin
        check(sb_addr == st_q[0].addr && sb_data == st_q[0].data, "store buffer address/data");
        void'(st_q.pop_front());
      end
      n_sb++;
    end
    @(negedge clk);
  endtask

  // A store whose data comes later over the CDB: the expected data is known
  // now and the broadcast is scheduled.
  task automatic store_data_later(int wait_c);
    logic [DW-1:0] v;
    v = DW'($urandom);
    dec_reg = RW'(32 + next_tag % 32);
    next_tag++;
    dec_data_rdy = 0;
    dec_data = v;              // for the scoreboard only; the unit ignores it
    cdb_q.push_back('{tag: dec_reg, data: v, wait_c: wait_c});
  endtask

  initial begin
    repeat (CYCLES + 400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int b = 0; b < 4; b++) base_val[b] = AW'(16'h1000 * (b + 1));
    idle(); agu_valid = 0; agu_id = 0; agu_addr = 0; cdb_valid = 0; cdb_tag = 0; cdb_data = 0;
    lb_ready = 1; sb_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- directed: load R6,8(R1); add R6,R6,4; store 8(R1),R6 ----
    idle(); dec_valid = 1; dec_base = 1; dec_off = 8; dec_reg = 6;
    #1 check(dec_issue && iss_tag_valid, "first load issues and gets an entry");
    begin
      int unsigned tid;
      tid = iss_tag_id;
      @(posedge clk); @(negedge clk);
      idle(); dec_valid = 1; dec_is_store = 1; dec_base = 1; dec_off = 8;
      dec_reg = 7; dec_data_rdy = 1; dec_data = 16'h0005;
      #1 check(dec_elim && !dec_issue, "store to the same reference is eliminated");
      @(posedge clk); @(negedge clk);
      idle();
      agu_valid = 1; agu_id = ID_W'(tid); agu_addr = ea(1, 8);
      #1 check(!sb_valid, "store waits for the address");
      @(posedge clk); @(negedge clk);
      agu_valid = 0;
      #1 check(sb_valid && sb_addr == ea(1, 8) && sb_data == 16'h0005,
               "store reaches the store buffer the cycle after the address");
      @(posedge clk); @(negedge clk);
      #1 check(!sb_valid, "store buffer request is single");
    end

    // ---- random phase ----
    for (int c = 0; c < CYCLES; c++) begin
      idle();
      lb_ready = ($urandom_range(0, 9) < 6);
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
        if (dec_is_store) begin
          if ($urandom_range(0, 1)) begin
            dec_data_rdy = 1; dec_data = DW'($urandom); dec_reg = RW'($urandom_range(8, 15));
          end else begin
            store_data_later($urandom_range(0, 5));
            n_cdb_st++;
          end
        end else dec_reg = RW'($urandom_range(8, 31));
      end
      step();
    end
    // drain
    idle(); lb_ready = 1; sb_ready = 1;
    for (int c = 0; c < 200; c++) step();
    check(ld_q.size() == 0 && st_q.size() == 0, "every eliminated access reached its buffer");
    check(n_el_ld > 50, "loads eliminated");
    check(n_el_st > 50, "stores eliminated");
    check(n_tag > 50, "instructions issued with an entry");
    check(n_plain > 20, "fall-backs to plain issue (full queue / saturated counter / no entry)");
    check(n_inv > 20 && n_cdb_st > 50, "invalidations and CDB data exercised");
    $display("elim_loads=%0d elim_stores=%0d issued_tagged=%0d issued_plain=%0d inv=%0d lb=%0d sb=%0d",
             n_el_ld, n_el_st, n_tag, n_plain, n_inv, n_lb, n_sb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
