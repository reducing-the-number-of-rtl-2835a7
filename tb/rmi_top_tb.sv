// rmi_top_tb: end-to-end test of rmi_top at its default parameters.
//
// One instruction stream drives both out-of-order realisations, Case A
// (a_*) and Case B (b_*): counter increments "load x(Rb); add; store x(Rb)"
// on twelve variables (4 base registers x 3 offsets, more than the 8 table
// entries, so entries are replaced), mixed with lone loads and stores. The
// testbench plays the core: it knows the base register values, generates
// addresses for instructions that carry an Entry ID after a random delay,
// broadcasts late store data on the CDB, changes base registers now and
// then (inv_*), and holds the load and store buffers not ready in bursts.
// Scoreboards check that every access Case A eliminates, and every store
// Case B places in its Special Store Reservation Station, reaches its
// buffer with the true address and data (Case B matched by ROB ID).
//
// The in-order unit (i_*) runs the counter increments as a compiler would
// emit them: the load marked to keep its address in a slot, the add marked
// to store its result there, and repeated loads of the same variable marked
// to take the cached address. Its write- and load-buffer outputs are checked
// against the expected address and data.
//
// After that, the predecode unit (p_*) takes over the in-order side: a
// random program of loads, stores and adds over eight registers (with many
// "load; add; store" to the same location) enters predecode, and the
// testbench plays the in-order pipeline behind it: it executes every
// instruction that leaves predecode on a register/memory model, passes it
// with its mark to the in-order unit, and applies the write-buffer writes of
// marked adds to the memory model. Repeated loads that predecode marks to
// use a cached address must reach the load buffer with the address they
// would have generated. Registers and memory at the end must equal those
// of the same program run without elimination.
//
// Each mechanism is counted and must occur at least once: Case A load and
// store elimination, fall-back to normal issue on a hit, entry reuse after
// replacement, CDB data capture, invalidation, buffer back-pressure; Case B
// SS RS stores, stores refused because the Process Bit is set; in-order
// marked stores and loads and back-pressure; stores dropped and loads
// served from a cached address by predecode.
module rmi_top_tb;
  localparam int unsigned RW = rmi_pkg::PREG_W, OW = rmi_pkg::OFF_W;
  localparam int unsigned AW = rmi_pkg::ADDR_W, DW = rmi_pkg::DATA_W;
  localparam int unsigned RBW = rmi_pkg::ROB_W, ID_W = $clog2(rmi_pkg::DLT_ENTRIES);
  localparam int unsigned LRW = 5;
  localparam int unsigned CYCLES = 6000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // Case A
  logic a_dec_valid, a_dec_is_store, a_dec_data_rdy, a_dec_elim, a_dec_issue, a_iss_tag_valid;
  logic [RW-1:0] a_dec_base, a_dec_reg, a_cdb_tag, a_inv_reg, a_lb_reg;
  logic [OW-1:0] a_dec_off;
  logic [DW-1:0] a_dec_data, a_cdb_data, a_sb_data;
  logic [ID_W-1:0] a_iss_tag_id, a_agu_id;
  logic a_agu_valid, a_cdb_valid, a_inv_en, a_lb_valid, a_lb_ready, a_sb_valid, a_sb_ready;
  logic [AW-1:0] a_agu_addr, a_lb_addr, a_sb_addr;
  // Case B
  logic b_dec_valid, b_dec_is_store, b_dec_data_rdy, b_dec_to_ssrs, b_dec_issue, b_iss_tag_valid;
  logic [RW-1:0] b_dec_base, b_dec_reg, b_cdb_tag, b_inv_reg;
  logic [OW-1:0] b_dec_off;
  logic [DW-1:0] b_dec_data, b_cdb_data, b_sb_data;
  logic [RBW-1:0] b_dec_rob, b_sb_rob;
  logic [ID_W-1:0] b_iss_tag_id, b_agu_id;
  logic b_agu_valid, b_cdb_valid, b_inv_en, b_sb_valid, b_sb_ready;
  logic [AW-1:0] b_agu_addr, b_sb_addr;
  // in-order
  logic i_ex_valid, i_ex_ready, i_miss, i_wb_valid, i_wb_ready, i_lb_valid, i_lb_ready;
  logic [1:0] i_ex_mark;
  logic [ID_W-1:0] i_ex_idx;
  logic [AW-1:0] i_ex_addr, i_wb_addr, i_lb_addr;
  logic [DW-1:0] i_ex_result, i_wb_data;
  logic [LRW-1:0] i_ex_rd, i_lb_reg;
  // predecode
  localparam int unsigned PW = 16;
  logic p_in_valid, p_in_ready, p_out_valid, p_out_ready, p_elim;
  logic [1:0] p_in_op, p_out_op, p_out_mark;
  logic [LRW-1:0] p_in_rd, p_in_rs1, p_in_rs2, p_out_rd, p_out_rs1, p_out_rs2;
  logic [OW-1:0] p_in_off, p_out_off;
  logic [PW-1:0] p_in_pay, p_out_pay;
  logic [ID_W-1:0] p_out_idx;

  // The in-order execute stage is driven either by the compiler-style
  // sequence (c_*) or, in the second phase, by the predecode output.
  bit pd_phase = 0;
  logic c_ex_valid, c_wb_ready, c_lb_ready;
  logic [1:0] c_ex_mark;
  logic [ID_W-1:0] c_ex_idx;
  logic [AW-1:0] c_ex_addr;
  logic [DW-1:0] c_ex_result;
  logic [LRW-1:0] c_ex_rd;
  // register/memory model of the in-order core in the predecode phase
  logic [DW-1:0] rf [8];
  logic [DW-1:0] pmem [logic [AW-1:0]];
  function automatic logic [AW-1:0] p_ea(logic [DW-1:0] b, logic [OW-1:0] o);
    return AW'((b + DW'(o)) & DW'(32'hFC));
  endfunction
  assign p_out_ready = i_ex_ready;
  assign i_ex_valid  = pd_phase ? p_out_valid : c_ex_valid;
  assign i_ex_mark   = pd_phase ? p_out_mark : c_ex_mark;
  assign i_ex_idx    = pd_phase ? p_out_idx : c_ex_idx;
  assign i_ex_addr   = pd_phase ? p_ea(rf[p_out_rs1[2:0]], p_out_off) : c_ex_addr;
  assign i_ex_result = pd_phase ? rf[p_out_rs1[2:0]] + rf[p_out_rs2[2:0]] + DW'(p_out_pay) : c_ex_result;
  assign i_ex_rd     = pd_phase ? p_out_rd : c_ex_rd;
  assign i_wb_ready  = pd_phase ? 1'b1 : c_wb_ready;
  assign i_lb_ready  = pd_phase ? 1'b1 : c_lb_ready;

  rmi_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ---------------- shared core model ----------------
  logic [AW-1:0] base_val [4];
  function automatic logic [AW-1:0] ea(int unsigned b, logic [OW-1:0] o);
    return base_val[b] + AW'($signed(o));
  endfunction

  typedef struct { int unsigned id; logic [AW-1:0] addr; int wait_c; } agu_t;
  typedef struct { logic [RW-1:0] tag; logic [DW-1:0] data; int wait_c; } cdb_t;
  typedef struct { logic [AW-1:0] addr; logic [RW-1:0] rd; } ld_t;
  typedef struct { logic [AW-1:0] addr; logic [DW-1:0] data; } st_t;
  agu_t a_agu_q [$], b_agu_q [$];
  cdb_t a_cdb_q [$], b_cdb_q [$];
  ld_t  a_ld_q [$];
  st_t  a_st_q [$];
  bit            b_busy [32];
  logic [AW-1:0] b_addr [32];
  logic [DW-1:0] b_data [32];
  bit            a_seen [4][3];

  // mechanism counters
  int a_el_ld = 0, a_el_st = 0, a_fallback = 0, a_realloc = 0, a_cdb = 0, n_inv = 0;
  int a_lb_stall = 0, a_sb_stall = 0, a_lb_n = 0, a_sb_n = 0;
  int b_ssrs = 0, b_pbit = 0, b_plain = 0, b_sb_n = 0, b_cdb = 0;
  int i_st = 0, i_ld = 0, i_hold = 0;
  int unsigned next_tag = 0, next_rob = 0;
  bit b_pending_ref [4][3];   // a store of this reference waits in the SS RS

  function automatic logic [OW-1:0] off_of(int unsigned k);
    return OW'(8 * k);
  endfunction

  task automatic pick_agu(ref agu_t q [$], output logic v, output logic [ID_W-1:0] id,
                          output logic [AW-1:0] ad);
    int k;
    v = 0; id = 0; ad = 0;
    for (int i = 0; i < q.size(); i++) if (q[i].wait_c > 0) q[i].wait_c--;
    k = -1;
    foreach (q[i]) if (k < 0 && q[i].wait_c == 0 && $urandom_range(0, 2) != 0) k = i;
    if (k >= 0) begin v = 1; id = ID_W'(q[k].id); ad = q[k].addr; q.delete(k); end
  endtask

  task automatic pick_cdb(ref cdb_t q [$], output logic v, output logic [RW-1:0] tg,
                          output logic [DW-1:0] d);
    int k;
    v = 0; tg = 0; d = 0;
    for (int i = 0; i < q.size(); i++) if (q[i].wait_c > 0) q[i].wait_c--;
    k = -1;
    foreach (q[i]) if (k < 0 && q[i].wait_c == 0) k = i;
    if (k >= 0) begin v = 1; tg = q[k].tag; d = q[k].data; q.delete(k); end
  endtask

  task automatic idle_dec();
    a_dec_valid = 0; a_dec_is_store = 0; a_dec_base = 0; a_dec_off = 0; a_dec_reg = 0;
    a_dec_data_rdy = 0; a_dec_data = 0; a_inv_en = 0; a_inv_reg = 0;
    b_dec_valid = 0; b_dec_is_store = 0; b_dec_base = 0; b_dec_off = 0; b_dec_reg = 0;
    b_dec_data_rdy = 0; b_dec_data = 0; b_dec_rob = 0; b_inv_en = 0; b_inv_reg = 0;
  endtask

  // Present one memory instruction to both out-of-order units.
  task automatic decode(bit is_store, int unsigned b, int unsigned k, logic [RW-1:0] rd);
    a_dec_valid = 1; a_dec_is_store = is_store; a_dec_base = RW'(b); a_dec_off = off_of(k);
    a_dec_reg = rd;
    if (is_store) begin
      a_dec_data = DW'($urandom);
      if ($urandom_range(0, 1)) a_dec_data_rdy = 1;
      else begin
        a_dec_data_rdy = 0;
        a_dec_reg = RW'(32 + next_tag % 32);
        next_tag++;
        a_cdb_q.push_back('{tag: a_dec_reg, data: a_dec_data, wait_c: $urandom_range(0, 5)});
        b_cdb_q.push_back('{tag: a_dec_reg, data: a_dec_data, wait_c: $urandom_range(0, 5)});
      end
    end
    b_dec_valid = 1; b_dec_is_store = is_store; b_dec_base = a_dec_base; b_dec_off = a_dec_off;
    b_dec_reg = a_dec_reg; b_dec_data_rdy = a_dec_data_rdy; b_dec_data = a_dec_data;
    b_dec_rob = RBW'(next_rob % 32);
    if (is_store) next_rob++;
  endtask

  // One cycle of the out-of-order side.
  task automatic ooo_cycle();
    int unsigned bb, kk;
    pick_agu(a_agu_q, a_agu_valid, a_agu_id, a_agu_addr);
    pick_agu(b_agu_q, b_agu_valid, b_agu_id, b_agu_addr);
    pick_cdb(a_cdb_q, a_cdb_valid, a_cdb_tag, a_cdb_data);
    pick_cdb(b_cdb_q, b_cdb_valid, b_cdb_tag, b_cdb_data);
    #1;
    bb = a_dec_base; kk = a_dec_off / 8;
    // ---- Case A ----
    if (a_dec_valid) begin
      check(a_dec_elim ^ a_dec_issue, "A: one destination");
      if (a_dec_elim) begin
        if (a_dec_is_store) begin
          a_st_q.push_back('{addr: ea(bb, a_dec_off), data: a_dec_data});
          a_el_st++;
          if (!a_dec_data_rdy) a_cdb++;
        end else begin
          a_ld_q.push_back('{addr: ea(bb, a_dec_off), rd: a_dec_reg});
          a_el_ld++;
        end
      end else if (a_iss_tag_valid) begin
        a_agu_q.push_back('{id: a_iss_tag_id, addr: ea(bb, a_dec_off), wait_c: $urandom_range(0, 6)});
        if (a_seen[bb][kk]) a_realloc++;
        a_seen[bb][kk] = 1;
      end else a_fallback++;
    end
    if (a_lb_valid && !a_lb_ready) a_lb_stall++;
    if (a_sb_valid && !a_sb_ready) a_sb_stall++;
    if (a_lb_valid && a_lb_ready) begin
      check(a_ld_q.size() > 0 && a_lb_addr == a_ld_q[0].addr && a_lb_reg == a_ld_q[0].rd,
            "A: load buffer address/register");
      if (a_ld_q.size() > 0) void'(a_ld_q.pop_front());
      a_lb_n++;
    end
    if (a_sb_valid && a_sb_ready) begin
      check(a_st_q.size() > 0 && a_sb_addr == a_st_q[0].addr && a_sb_data == a_st_q[0].data,
            "A: store buffer address/data");
      if (a_st_q.size() > 0) void'(a_st_q.pop_front());
      a_sb_n++;
    end
    // ---- Case B ----
    if (b_dec_valid) begin
      check(b_dec_to_ssrs ^ b_dec_issue, "B: one destination");
      if (!b_dec_is_store) begin
        check(b_dec_issue, "B: loads issue");
        if (b_iss_tag_valid)
          b_agu_q.push_back('{id: b_iss_tag_id, addr: ea(bb, b_dec_off), wait_c: $urandom_range(0, 6)});
      end else if (b_dec_to_ssrs) begin
        b_busy[b_dec_rob] = 1; b_addr[b_dec_rob] = ea(bb, b_dec_off); b_data[b_dec_rob] = b_dec_data;
        b_ssrs++;
        if (!b_dec_data_rdy) b_cdb++;
      end else begin
        b_plain++;
        if (b_pending_ref[bb][kk]) b_pbit++;
      end
    end
    if (b_sb_valid && b_sb_ready) begin
      check(b_busy[b_sb_rob] && b_sb_addr == b_addr[b_sb_rob] && b_sb_data == b_data[b_sb_rob],
            "B: store buffer address/data/ROB ID");
      b_busy[b_sb_rob] = 0;
      b_sb_n++;
    end
    @(posedge clk);
    if (b_dec_valid && b_dec_is_store && b_dec_to_ssrs) b_pending_ref[bb][kk] = 1;
    if (b_sb_valid && b_sb_ready)
      for (int x = 0; x < 4; x++) for (int y = 0; y < 3; y++)
        if (b_addr[b_sb_rob] == ea(x, off_of(y))) b_pending_ref[x][y] = 0;
    @(negedge clk);
  endtask

  // ---------------- in-order side (own process) ----------------
  typedef struct { bit st; logic [AW-1:0] addr; logic [DW-1:0] data; logic [LRW-1:0] rd; } io_t;
  io_t i_wb_q [$], i_lb_q [$];
  bit i_done = 0;

  initial begin : inorder
    c_ex_valid = 0; c_ex_mark = 0; c_ex_idx = 0; c_ex_addr = 0; c_ex_result = 0; c_ex_rd = 0;
    c_wb_ready = 1; c_lb_ready = 1;
    wait (rst_n);
    @(negedge clk);
    for (int n = 0; n < CYCLES / 2; n++) begin
      // one counter increment on a random variable, compiler-marked:
      //   load  R6, x      MARK_GEN   (address kept in slot s)
      //   load  R7, x      MARK_LOAD  (repeated load, cached address) - sometimes
      //   add   R6, R6, 4  MARK_STORE (result also written to x)
      logic [AW-1:0] x;
      logic [DW-1:0] v;
      int unsigned s, kind;
      x = AW'($urandom) & ~AW'(3);
      s = $urandom_range(0, rmi_pkg::DLT_ENTRIES - 1);
      v = DW'($urandom);
      for (int step_i = 0; step_i < 3; step_i++) begin
        kind = step_i;
        if (kind == 1 && $urandom_range(0, 1) == 0) continue;
        c_ex_valid = 1; c_ex_idx = ID_W'(s); c_ex_addr = x; c_ex_rd = LRW'(6 + kind);
        c_ex_result = v;
        c_ex_mark = (kind == 0) ? 2'(rmi_pkg::MARK_GEN) :
                    (kind == 1) ? 2'(rmi_pkg::MARK_LOAD) : 2'(rmi_pkg::MARK_STORE);
        do begin
          c_wb_ready = ($urandom_range(0, 9) < 6);
          c_lb_ready = ($urandom_range(0, 9) < 6);
          #1;
          if (!i_ex_ready) i_hold++;
          @(posedge clk);
          @(negedge clk);
        end while (!i_ex_ready_q);
        if (kind == 1) i_lb_q.push_back('{st: 0, addr: x, data: 0, rd: LRW'(7)});
        if (kind == 2) i_wb_q.push_back('{st: 1, addr: x, data: v, rd: 0});
      end
      c_ex_valid = 0;
    end
    c_ex_valid = 0; c_wb_ready = 1; c_lb_ready = 1;
    repeat (5) @(negedge clk);
    i_done = 1;
    pd_phase = 1;
  end

  // ex_ready sampled at the clock edge (was the instruction taken?)
  bit i_ex_ready_q;
  always @(posedge clk) i_ex_ready_q <= i_ex_ready;

  always @(posedge clk) if (rst_n) begin
    if (i_miss) begin failures++; $display("FAIL t=%0t in-order: unexpected GAC miss", $time); end
    if (pd_phase) begin
      // marked add result reaches memory through the write buffer ...
      if (i_wb_valid && i_wb_ready) begin pmem[i_wb_addr] = i_wb_data; p_wb++; end
      // ... a repeated load must get the address it would have generated ...
      if (i_lb_valid && i_lb_ready) begin
        checks++;
        if (p_lb_q.size() == 0 || i_lb_addr != p_lb_q[0].addr || i_lb_reg != p_lb_q[0].rd) begin
          failures++; $display("FAIL t=%0t predecode phase: load buffer", $time);
        end
        if (p_lb_q.size() > 0) void'(p_lb_q.pop_front());
        p_lb++;
      end
      // ... then the instruction the in-order unit accepts this cycle executes
      if (p_out_valid && p_out_ready) p_exec();
    end else if (i_wb_valid && i_wb_ready) begin
      checks++;
      if (i_wb_q.size() == 0 || i_wb_addr != i_wb_q[0].addr || i_wb_data != i_wb_q[0].data) begin
        failures++; $display("FAIL t=%0t in-order write buffer", $time);
      end
      if (i_wb_q.size() > 0) void'(i_wb_q.pop_front());
      i_st++;
    end
    if (!pd_phase && i_lb_valid && i_lb_ready) begin
      checks++;
      if (i_lb_q.size() == 0 || i_lb_addr != i_lb_q[0].addr || i_lb_reg != i_lb_q[0].rd) begin
        failures++; $display("FAIL t=%0t in-order load buffer", $time);
      end
      if (i_lb_q.size() > 0) void'(i_lb_q.pop_front());
      i_ld++;
    end
  end

  // ---------------- predecode phase ----------------
  typedef struct { logic [1:0] op; int unsigned rd, rs1, rs2, off, pay; } pins_t;
  int p_wb = 0, p_drop = 0, p_n = 0, p_lb = 0;
  io_t p_lb_q [$];
  bit p_done = 0;
  logic [DW-1:0] ref_rf [8];
  logic [DW-1:0] ref_mem [logic [AW-1:0]];

  function automatic logic [DW-1:0] rd_mem(ref logic [DW-1:0] m [logic [AW-1:0]], input logic [AW-1:0] a);
    return m.exists(a) ? m[a] : '0;
  endfunction

  task automatic p_exec();
    logic [AW-1:0] a;
    a = p_ea(rf[p_out_rs1[2:0]], p_out_off);
    case (p_out_op)
      2'(rmi_pkg::OP_LOAD): begin
        rf[p_out_rd[2:0]] = rd_mem(pmem, a);
        if (p_out_mark == 2'(rmi_pkg::MARK_LOAD)) p_lb_q.push_back('{st: 0, addr: a, data: 0, rd: p_out_rd});
      end
      2'(rmi_pkg::OP_STORE): pmem[a] = rf[p_out_rs2[2:0]];
      2'(rmi_pkg::OP_ALU):   rf[p_out_rd[2:0]] = i_ex_result;
      default: ;
    endcase
    p_n++;
  endtask

  task automatic ref_exec(pins_t i);
    logic [AW-1:0] a;
    a = p_ea(ref_rf[i.rs1], OW'(i.off));
    case (i.op)
      2'(rmi_pkg::OP_LOAD):  ref_rf[i.rd] = rd_mem(ref_mem, a);
      2'(rmi_pkg::OP_STORE): ref_mem[a] = ref_rf[i.rs2];
      2'(rmi_pkg::OP_ALU):   ref_rf[i.rd] = ref_rf[i.rs1] + ref_rf[i.rs2] + DW'(i.pay);
      default: ;
    endcase
  endtask

  always @(posedge clk) if (rst_n && pd_phase && p_elim) p_drop++;

  initial begin : predecode_phase
    pins_t prog [$];
    p_in_valid = 0; p_in_op = 0; p_in_rd = 0; p_in_rs1 = 0; p_in_rs2 = 0; p_in_off = 0; p_in_pay = 0;
    for (int r = 0; r < 8; r++) begin
      rf[r] = DW'(r * 16); ref_rf[r] = DW'(r * 16);
    end
    // program: counter increments "load r,o(b); add r,r,rk,imm; store r,o(b)"
    // (sometimes with an unrelated instruction in between) mixed with
    // single loads, stores and adds, some of which overwrite base registers
    while (prog.size() < CYCLES / 2) begin
      int unsigned b, r, o;
      b = $urandom_range(1, 3); r = $urandom_range(4, 7); o = 4 * $urandom_range(0, 3);
      if ($urandom_range(0, 1) == 0) begin
        prog.push_back('{op: 2'(rmi_pkg::OP_LOAD), rd: r, rs1: b, rs2: 0, off: o, pay: 0});
        if ($urandom_range(0, 3) == 0)
          prog.push_back('{op: 2'(rmi_pkg::OP_OTHER), rd: 0, rs1: 0, rs2: 0, off: 0, pay: 0});
        prog.push_back('{op: 2'(rmi_pkg::OP_ALU), rd: r, rs1: r, rs2: 0, off: 0, pay: $urandom_range(1, 9)});
        if ($urandom_range(0, 5) == 0)
          prog.push_back('{op: 2'(rmi_pkg::OP_STORE), rd: 0, rs1: $urandom_range(1, 3), rs2: $urandom_range(4, 7),
                           off: 4 * $urandom_range(0, 3), pay: 0});
        prog.push_back('{op: 2'(rmi_pkg::OP_STORE), rd: 0, rs1: b, rs2: r, off: o, pay: 0});
      end else begin
        case ($urandom_range(0, 3))
          0: prog.push_back('{op: 2'(rmi_pkg::OP_LOAD), rd: r, rs1: b, rs2: 0, off: o, pay: 0});
          1: prog.push_back('{op: 2'(rmi_pkg::OP_STORE), rd: 0, rs1: b, rs2: r, off: o, pay: 0});
          2: prog.push_back('{op: 2'(rmi_pkg::OP_ALU), rd: $urandom_range(1, 7), rs1: $urandom_range(0, 7),
                              rs2: $urandom_range(0, 7), off: 0, pay: $urandom_range(0, 3) * 16});
          default: prog.push_back('{op: 2'(rmi_pkg::OP_OTHER), rd: 0, rs1: 0, rs2: 0, off: 0, pay: 0});
        endcase
      end
    end
    foreach (prog[k]) ref_exec(prog[k]);
    wait (pd_phase);
    @(negedge clk);
    foreach (prog[k]) begin
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      p_in_valid = 1; p_in_op = prog[k].op; p_in_rd = LRW'(prog[k].rd);
      p_in_rs1 = LRW'(prog[k].rs1); p_in_rs2 = LRW'(prog[k].rs2);
      p_in_off = OW'(prog[k].off); p_in_pay = PW'(prog[k].pay);
      #1;
      while (!p_in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      p_in_valid = 0;
    end
    repeat (20) @(negedge clk);
    checks++;
    if (p_n + p_drop != prog.size()) begin
      failures++; $display("FAIL predecode: %0d executed + %0d dropped != %0d", p_n, p_drop, prog.size());
    end
    for (int r = 0; r < 8; r++) begin
      checks++;
      if (rf[r] !== ref_rf[r]) begin failures++; $display("FAIL predecode: register %0d", r); end
    end
    foreach (ref_mem[a]) begin
      checks++;
      if (rd_mem(pmem, a) !== ref_mem[a]) begin failures++; $display("FAIL predecode: memory %0h", a); end
    end
    checks++;
    if (pmem.num() != ref_mem.num()) begin failures++; $display("FAIL predecode: extra memory writes"); end
    p_done = 1;
  end

  initial begin
    repeat (CYCLES * 5) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- out-of-order stimulus ----------------
  initial begin : ooo
    int unsigned b, k;
    for (int x = 0; x < 4; x++) begin
      base_val[x] = AW'(32'h0001_0000 * (x + 1));
      for (int y = 0; y < 3; y++) begin a_seen[x][y] = 0; b_pending_ref[x][y] = 0; end
    end
    for (int i = 0; i < 32; i++) b_busy[i] = 0;
    idle_dec();
    a_agu_valid = 0; a_agu_id = 0; a_agu_addr = 0; a_cdb_valid = 0; a_cdb_tag = 0; a_cdb_data = 0;
    b_agu_valid = 0; b_agu_id = 0; b_agu_addr = 0; b_cdb_valid = 0; b_cdb_tag = 0; b_cdb_data = 0;
    a_lb_ready = 1; a_sb_ready = 1; b_sb_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < CYCLES; ) begin
      // buffers: ready most of the time, not ready in bursts
      if (c % 200 < 30) begin a_lb_ready = 0; a_sb_ready = 0; b_sb_ready = 0; end
      else begin
        a_lb_ready = ($urandom_range(0, 9) < 8);
        a_sb_ready = ($urandom_range(0, 9) < 8);
        b_sb_ready = ($urandom_range(0, 9) < 8);
      end
      b = $urandom_range(0, 3); k = $urandom_range(0, 2);
      case ($urandom_range(0, 3))
        0, 1: begin   // counter increment: load, (add not seen here), store
          idle_dec(); decode(0, b, k, RW'(8 + c % 16)); ooo_cycle(); c++;
          idle_dec(); ooo_cycle(); c++;                // add executes
          idle_dec(); decode(1, b, k, RW'(8 + c % 16)); ooo_cycle(); c++;
        end
        2: begin      // lone load
          idle_dec(); decode(0, b, k, RW'(24 + c % 8)); ooo_cycle(); c++;
        end
        default: begin
          idle_dec();
          if ($urandom_range(0, 7) == 0) begin
            a_inv_en = 1; a_inv_reg = RW'(b); b_inv_en = 1; b_inv_reg = RW'(b);
            base_val[b] = AW'($urandom);
            n_inv++;
          end else decode(1, b, k, RW'(8));
          ooo_cycle(); c++;
        end
      endcase
    end
    idle_dec(); a_lb_ready = 1; a_sb_ready = 1; b_sb_ready = 1;
    for (int c = 0; c < 100; c++) ooo_cycle();
    wait (p_done);
    begin
      automatic int left = 0;
      for (int i = 0; i < 32; i++) left += b_busy[i];
      check(a_ld_q.size() == 0 && a_st_q.size() == 0, "A: every eliminated access drained");
      check(left == 0, "B: every SS RS store drained");
      check(i_wb_q.size() == 0 && i_lb_q.size() == 0, "in-order: every marked access drained");
    end
    check(a_el_ld > 0,    "mechanism: A load eliminated");
    check(a_el_st > 0,    "mechanism: A store eliminated");
    check(a_fallback > 0, "mechanism: A hit or miss issued without entry");
    check(a_realloc > 0,  "mechanism: A entry replaced and reassigned");
    check(a_cdb > 0,      "mechanism: A store data from CDB");
    check(n_inv > 0,      "mechanism: base register invalidation");
    check(a_lb_stall > 0 && a_sb_stall > 0, "mechanism: A buffer back-pressure");
    check(b_ssrs > 0,     "mechanism: B store to SS RS");
    check(b_pbit > 0,     "mechanism: B store refused, Process Bit set");
    check(b_cdb > 0,      "mechanism: B store data from CDB");
    check(i_st > 0 && i_ld > 0, "mechanism: in-order marked store and load");
    check(i_hold > 0,     "mechanism: in-order back-pressure");
    check(p_drop > 0 && p_wb > 0, "mechanism: predecode store dropped, result via write buffer");
    check(p_lb > 0,       "mechanism: predecode repeated load, cached address to load buffer");
    check(p_lb_q.size() == 0, "predecode phase: every cached load reached the load buffer");
    $display("A: elim_ld=%0d elim_st=%0d fallback=%0d realloc=%0d cdb=%0d lb=%0d sb=%0d stalls=%0d/%0d",
             a_el_ld, a_el_st, a_fallback, a_realloc, a_cdb, a_lb_n, a_sb_n, a_lb_stall, a_sb_stall);
    $display("B: ssrs=%0d plain=%0d pbit_refused=%0d cdb=%0d sb=%0d  inv=%0d",
             b_ssrs, b_plain, b_pbit, b_cdb, b_sb_n, n_inv);
    $display("I: marked_stores=%0d marked_loads=%0d holds=%0d", i_st, i_ld, i_hold);
    $display("P: executed=%0d dropped_stores=%0d wb_writes=%0d cached_loads=%0d", p_n, p_drop, p_wb, p_lb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
