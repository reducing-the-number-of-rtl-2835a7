// rmi_inorder_tb: self-checking test of the in-order RMI forwarding stage.
//
// A model of the compiler-managed Generated Address Cache and of the two
// output registers runs beside the DUT. The directed start follows the
// counter increment as the compiler would emit it: "load R6,8(R1)" marked
// to keep its address in slot 2, then "add R6,R6,4" marked to store its
// result at slot 2 (the store itself is gone); the result must reach the
// write buffer one cycle later with the load's address. The random phase
// mixes all marks, random slots and random buffer ready, and checks every
// cycle ex_ready, the miss flag and the content of both outputs, including
// that an output is held while its buffer is not ready.
module rmi_inorder_tb;
  localparam int unsigned N = 4, RW = 5, AW = 16, DW = 16, ID_W = 2, CYCLES = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ex_valid, ex_ready, miss_o, wb_valid, wb_ready, lb_valid, lb_ready;
  rmi_pkg::rmi_mark_e ex_mark;
  logic [ID_W-1:0] ex_idx;
  logic [AW-1:0] ex_addr, wb_addr, lb_addr;
  logic [DW-1:0] ex_result, wb_data;
  logic [RW-1:0] ex_rd, lb_reg;

  rmi_inorder #(.ENTRIES(N), .REG_W(RW), .ADDR_W(AW), .DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  bit g_valid [N];
  logic [AW-1:0] g_addr [N];
  bit m_wbv, m_lbv, m_miss;
  logic [AW-1:0] m_wba, m_lba;
  logic [DW-1:0] m_wbd;
  logic [RW-1:0] m_lbr;
  int n_st = 0, n_ld = 0, n_gen = 0, n_miss = 0, n_hold = 0;

  task automatic step();
    bit rdy, take, hit;
    #1;
    rdy = !(m_wbv && !wb_ready) && !(m_lbv && !lb_ready);
    check(ex_ready == rdy, "ex_ready");
    check(wb_valid == m_wbv && lb_valid == m_lbv && miss_o == m_miss, "output valids / miss");
    if (m_wbv) check(wb_addr == m_wba && wb_data == m_wbd, "write buffer payload");
    if (m_lbv) check(lb_addr == m_lba && lb_reg == m_lbr, "load buffer payload");
    if (!rdy && ex_valid) n_hold++;
    take = ex_valid && rdy;
    hit = g_valid[ex_idx];
    @(posedge clk);
    if (m_wbv && wb_ready) m_wbv = 0;
    if (m_lbv && lb_ready) m_lbv = 0;
    m_miss = take && (ex_mark == rmi_pkg::MARK_STORE || ex_mark == rmi_pkg::MARK_LOAD) && !hit;
    if (m_miss) n_miss++;
    if (take && ex_mark == rmi_pkg::MARK_STORE && hit) begin
      m_wbv = 1; m_wba = g_addr[ex_idx]; m_wbd = ex_result; n_st++;
    end
    if (take && ex_mark == rmi_pkg::MARK_LOAD && hit) begin
      m_lbv = 1; m_lba = g_addr[ex_idx]; m_lbr = ex_rd; n_ld++;
    end
    if (take && ex_mark == rmi_pkg::MARK_GEN) begin
      g_valid[ex_idx] = 1; g_addr[ex_idx] = ex_addr; n_gen++;
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int i = 0; i < N; i++) begin g_valid[i] = 0; g_addr[i] = 0; end
    m_wbv = 0; m_lbv = 0; m_miss = 0; m_wba = 0; m_lba = 0; m_wbd = 0; m_lbr = 0;
    ex_valid = 0; ex_mark = rmi_pkg::MARK_NONE; ex_idx = 0; ex_addr = 0; ex_result = 0; ex_rd = 0;
    wb_ready = 1; lb_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // load R6,8(R1) with R1 = 0x0100: address 0x0108 kept in slot 2
    ex_valid = 1; ex_mark = rmi_pkg::MARK_GEN; ex_idx = 2; ex_addr = 16'h0108; ex_rd = 6;
    step();
    // add R6,R6,4 marked: result 0x002A also stored at slot 2
    ex_mark = rmi_pkg::MARK_STORE; ex_idx = 2; ex_result = 16'h002A; ex_addr = 0;
    #1 check(!wb_valid, "nothing in the write buffer yet");
    step();
    ex_valid = 0;
    #1 check(wb_valid && wb_addr == 16'h0108 && wb_data == 16'h002A,
             "marked result reaches the write buffer one cycle later with the cached address");
    step();
    for (int c = 0; c < CYCLES; c++) begin
      ex_valid  = ($urandom_range(0, 9) < 8);
      ex_mark   = rmi_pkg::rmi_mark_e'($urandom_range(0, 3));
      ex_idx    = ID_W'($urandom_range(0, N-1));
      ex_addr   = AW'($urandom);
      ex_result = DW'($urandom);
      ex_rd     = RW'($urandom);
      wb_ready  = ($urandom_range(0, 9) < 6);
      lb_ready  = ($urandom_range(0, 9) < 6);
      step();
    end
    check(n_st > 100 && n_ld > 100 && n_gen > 100, "all marks exercised");
    check(n_miss > 0 && n_hold > 50, "misses and buffer back-pressure exercised");
    $display("stores=%0d loads=%0d gen=%0d miss=%0d hold=%0d", n_st, n_ld, n_gen, n_miss, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
