// rmi_inc_counter_tb: the counter-increment workload on every realisation.
//
// The workload is the typical compiled form of "counter++" with the counter
// at offset 8 from base register R1:
//     load  R6, 8(R1)
//     add   R6, R6, 4
//     store 8(R1), R6
// repeated N times on the same counter. Without address reuse every
// repetition generates the counter's address twice, 2*N address generations
// in all. The testbench runs the sequence through rmi_top at its default
// parameters, one repetition at a time, and checks the exact outcome of each
// realisation:
//  * Case A: only the first load is issued; every later load and every store
//    is eliminated and reaches the load or store buffer with the counter's
//    address. One address generation in all.
//  * Case B: every load is issued and generates the address; every store
//    goes to the Special Store Reservation Station and reaches the store
//    buffer with the load's address and its ROB ID. N address generations.
//  * Predecode + in-order: the program streams through the predecode unit;
//    every store is dropped and every add is marked, and the in-order unit
//    writes each sum to the counter's address from the GAC. Only the first
//    load generates the address; every later load is marked to take it
//    from the GAC and reaches the load buffer. One address generation.
// Data is checked too: the store buffers must see 104, 108, ... in order
// (the counter starts at 100), and the in-order run must leave the counter
// at 100 + 4*N.
module rmi_inc_counter_tb;
  localparam int unsigned RW = rmi_pkg::PREG_W, OW = rmi_pkg::OFF_W;
  localparam int unsigned AW = rmi_pkg::ADDR_W, DW = rmi_pkg::DATA_W;
  localparam int unsigned RBW = rmi_pkg::ROB_W, ID_W = $clog2(rmi_pkg::DLT_ENTRIES);
  localparam int unsigned LRW = 5, PW = 16;
  localparam int unsigned N = 8;
  localparam logic [AW-1:0] R1_VAL = 32'h0000_1000;
  localparam logic [OW-1:0] OFF = 16'd8;
  localparam logic [AW-1:0] X = R1_VAL + AW'(OFF);
  localparam logic [DW-1:0] START = 32'd100;

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
  logic p_in_valid, p_in_ready, p_out_valid, p_out_ready, p_elim;
  logic [1:0] p_in_op, p_out_op, p_out_mark;
  logic [LRW-1:0] p_in_rd, p_in_rs1, p_in_rs2, p_out_rd, p_out_rs1, p_out_rs2;
  logic [OW-1:0] p_in_off, p_out_off;
  logic [PW-1:0] p_in_pay, p_out_pay;
  logic [ID_W-1:0] p_out_idx;

  rmi_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ---------------- out-of-order realisations ----------------
  int a_issue = 0, a_el_ld = 0, a_el_st = 0, a_agu = 0, a_lb_n = 0, a_sb_n = 0;
  int b_issue = 0, b_ssrs = 0, b_agu = 0, b_sb_n = 0;
  bit ooo_done = 0;

  task automatic idle_dec();
    a_dec_valid = 0; a_dec_is_store = 0; a_dec_base = 0; a_dec_off = 0; a_dec_reg = 0;
    a_dec_data_rdy = 0; a_dec_data = 0;
    b_dec_valid = 0; b_dec_is_store = 0; b_dec_base = 0; b_dec_off = 0; b_dec_reg = 0;
    b_dec_data_rdy = 0; b_dec_data = 0; b_dec_rob = 0;
    a_agu_valid = 0; a_agu_id = 0; a_agu_addr = 0; a_cdb_valid = 0; a_cdb_tag = 0; a_cdb_data = 0;
    b_agu_valid = 0; b_agu_id = 0; b_agu_addr = 0; b_cdb_valid = 0; b_cdb_tag = 0; b_cdb_data = 0;
  endtask

  // the load and store buffers: always ready, check what arrives
  always @(posedge clk) if (rst_n) begin
    if (a_lb_valid) begin
      check(a_lb_addr == X, "A: load buffer address");
      check(a_lb_reg == RW'(10 + 2 * (a_lb_n + 1)), "A: load buffer destination register");
      a_lb_n++;
    end
    if (a_sb_valid) begin
      check(a_sb_addr == X, "A: store buffer address");
      check(a_sb_data == START + DW'(4 * (a_sb_n + 1)), "A: store buffer data");
      a_sb_n++;
    end
    if (b_sb_valid) begin
      check(b_sb_addr == X, "B: store buffer address");
      check(b_sb_data == START + DW'(4 * (b_sb_n + 1)), "B: store buffer data");
      check(b_sb_rob == RBW'(b_sb_n), "B: store buffer ROB ID");
      b_sb_n++;
    end
  end

  initial begin : ooo
    logic [ID_W-1:0] a_id, b_id;
    bit a_gen;
    a_lb_ready = 1; a_sb_ready = 1; b_sb_ready = 1;
    a_inv_en = 0; a_inv_reg = 0; b_inv_en = 0; b_inv_reg = 0;
    idle_dec();
    wait (rst_n);
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      logic [RW-1:0] ld_rd, add_rd;
      ld_rd = RW'(10 + 2 * n); add_rd = RW'(11 + 2 * n);
      // load R6, 8(R1)   (R6 renamed to ld_rd, R1 is physical register 1)
      a_dec_valid = 1; a_dec_is_store = 0; a_dec_base = RW'(1); a_dec_off = OFF; a_dec_reg = ld_rd;
      b_dec_valid = 1; b_dec_is_store = 0; b_dec_base = RW'(1); b_dec_off = OFF; b_dec_reg = ld_rd;
      #1;
      a_gen = a_dec_issue && a_iss_tag_valid; a_id = a_iss_tag_id;
      if (a_dec_issue) a_issue++;
      if (a_dec_elim) a_el_ld++;
      check(n == 0 ? a_gen : a_dec_elim, "A: first load issued with an entry, later loads eliminated");
      check(b_dec_issue && b_iss_tag_valid, "B: load issued and opens an entry");
      if (b_dec_issue) b_issue++;
      b_id = b_iss_tag_id;
      @(negedge clk);
      idle_dec();
      // add R6, R6, 4 is not a memory instruction: nothing to decode here
      @(negedge clk);
      // the loads generate their address (Case A: only if issued with an entry)
      if (a_gen) begin a_agu_valid = 1; a_agu_id = a_id; a_agu_addr = X; a_agu++; end
      b_agu_valid = 1; b_agu_id = b_id; b_agu_addr = X; b_agu++;
      // store 8(R1), R6  (value still being computed by the add -> tag add_rd)
      a_dec_valid = 1; a_dec_is_store = 1; a_dec_base = RW'(1); a_dec_off = OFF; a_dec_reg = add_rd;
      a_dec_data_rdy = 0;
      b_dec_valid = 1; b_dec_is_store = 1; b_dec_base = RW'(1); b_dec_off = OFF; b_dec_reg = add_rd;
      b_dec_data_rdy = 0; b_dec_rob = RBW'(n);
      #1;
      check(a_dec_elim && !a_dec_issue, "A: store eliminated");
      if (a_dec_elim) a_el_st++;
      if (a_dec_issue) a_issue++;
      check(b_dec_to_ssrs && !b_dec_issue, "B: store placed in the SS RS");
      if (b_dec_to_ssrs) b_ssrs++;
      @(negedge clk);
      idle_dec();
      @(negedge clk);
      // the add completes and broadcasts its sum
      a_cdb_valid = 1; a_cdb_tag = add_rd; a_cdb_data = START + DW'(4 * (n + 1));
      b_cdb_valid = 1; b_cdb_tag = add_rd; b_cdb_data = START + DW'(4 * (n + 1));
      @(negedge clk);
      idle_dec();
      repeat (4) @(negedge clk);
    end
    ooo_done = 1;
  end

  // ---------------- predecode + in-order realisation ----------------
  logic [DW-1:0] rf [8];
  logic [DW-1:0] mem_x;
  int p_drop = 0, p_gen = 0, p_mld = 0, p_mst = 0, p_wb = 0, p_lb = 0, p_agu = 0;
  bit p_done = 0;

  assign p_out_ready = i_ex_ready;
  assign i_ex_valid  = p_out_valid;
  assign i_ex_mark   = p_out_mark;
  assign i_ex_idx    = p_out_idx;
  assign i_ex_addr   = rf[p_out_rs1[2:0]] + DW'(p_out_off);
  assign i_ex_result = rf[p_out_rs1[2:0]] + DW'(p_out_pay);
  assign i_ex_rd     = p_out_rd;
  assign i_wb_ready  = 1'b1;
  assign i_lb_ready  = 1'b1;

  // the in-order pipeline behind predecode: write buffer first, then the
  // instruction accepted this cycle
  always @(posedge clk) if (rst_n) begin
    if (i_miss) begin failures++; $display("FAIL t=%0t in-order: GAC miss", $time); end
    if (i_wb_valid) begin
      check(i_wb_addr == X, "in-order: write buffer address");
      check(i_wb_data == START + DW'(4 * (p_wb + 1)), "in-order: write buffer data");
      mem_x = i_wb_data;
      p_wb++;
    end
    if (i_lb_valid) begin
      check(i_lb_addr == X && i_lb_reg == LRW'(6), "in-order: load buffer address and register");
      p_lb++;
    end
    if (p_out_valid && p_out_ready) begin
      case (p_out_op)
        2'(rmi_pkg::OP_LOAD): begin
          check(i_ex_addr == X, "in-order: load address");
          check(p_out_mark == ((p_gen + p_mld == 0) ? 2'(rmi_pkg::MARK_GEN) : 2'(rmi_pkg::MARK_LOAD)),
                "predecode: first load keeps its address, later loads use it");
          rf[p_out_rd[2:0]] = mem_x;
          if (p_out_mark == 2'(rmi_pkg::MARK_GEN)) begin p_gen++; p_agu++; end
          if (p_out_mark == 2'(rmi_pkg::MARK_LOAD)) p_mld++;
        end
        2'(rmi_pkg::OP_ALU): begin
          check(p_out_mark == 2'(rmi_pkg::MARK_STORE), "predecode: add marked to store its result");
          rf[p_out_rd[2:0]] = i_ex_result;
          if (p_out_mark == 2'(rmi_pkg::MARK_STORE)) p_mst++;
        end
        2'(rmi_pkg::OP_STORE): begin
          check(0, "predecode: a store was not dropped");
          mem_x = rf[p_out_rs2[2:0]];
          p_agu++;
        end
        default: ;
      endcase
    end
    if (p_elim) p_drop++;
  end

  initial begin : inorder
    for (int r = 0; r < 8; r++) rf[r] = '0;
    rf[1] = R1_VAL;
    mem_x = START;
    p_in_valid = 0; p_in_op = 0; p_in_rd = 0; p_in_rs1 = 0; p_in_rs2 = 0; p_in_off = 0; p_in_pay = 0;
    wait (rst_n);
    @(negedge clk);
    for (int n = 0; n < N; n++)
      for (int s = 0; s < 3; s++) begin
        p_in_valid = 1;
        case (s)
          0: begin p_in_op = 2'(rmi_pkg::OP_LOAD);  p_in_rd = 6; p_in_rs1 = 1; p_in_rs2 = 0; p_in_off = OFF; p_in_pay = 0; end
          1: begin p_in_op = 2'(rmi_pkg::OP_ALU);   p_in_rd = 6; p_in_rs1 = 6; p_in_rs2 = 0; p_in_off = 0;   p_in_pay = 4; end
          default: begin p_in_op = 2'(rmi_pkg::OP_STORE); p_in_rd = 0; p_in_rs1 = 1; p_in_rs2 = 6; p_in_off = OFF; p_in_pay = 0; end
        endcase
        #1;
        while (!p_in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
    p_in_valid = 0;
    repeat (20) @(negedge clk);
    check(mem_x == START + DW'(4 * N), "in-order: final counter value");
    check(rf[6] == START + DW'(4 * N), "in-order: final R6");
    p_done = 1;
  end

  // ---------------- results ----------------
  initial begin
    repeat (N * 20 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ooo_done && p_done);
    repeat (10) @(posedge clk);
    check(a_issue == 1 && a_el_ld == N - 1 && a_el_st == N, "A: 1 issued, N-1 loads and N stores eliminated");
    check(a_lb_n == N - 1 && a_sb_n == N, "A: every eliminated access reached its buffer");
    check(a_agu == 1, "A: one address generation");
    check(b_issue == N && b_ssrs == N && b_sb_n == N, "B: N loads issued, N stores through the SS RS");
    check(b_agu == N, "B: N address generations");
    check(p_drop == N && p_mst == N && p_wb == N, "predecode: N stores dropped, N adds forwarded");
    check(p_gen == 1 && p_mld == N - 1 && p_lb == N - 1, "predecode: 1 load keeps the address, N-1 use it");
    check(p_agu == 1, "in-order: one address generation");
    $display("address generations for %0d increments: without reuse %0d, Case A %0d, Case B %0d, in-order %0d",
             N, 2 * N, a_agu, b_agu, p_agu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
