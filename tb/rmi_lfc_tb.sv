// rmi_lfc_tb: self-checking test of the Load Forward Control queue.
//
// The testbench plays the Generated Address Cache (a table of addresses with
// Valid Bits, read combinationally through gac_rd_id) and the load buffer
// (random lb_ready). Eliminated loads are pushed at random whenever the queue
// is not full; GAC slots become valid at random. A model FIFO predicts, each
// cycle, whether the head may leave and with which address, register and
// released Entry ID, and whether the queue is full. Directed check: a load
// whose address is already valid reaches the load buffer in the next cycle.
module rmi_lfc_tb;
  localparam int unsigned D = 4, N = 4, RW = 4, AW = 16, ID_W = 2, CYCLES = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push_en, full, gac_rd_valid, lb_valid, lb_ready, rel_en;
  logic [ID_W-1:0] push_id, gac_rd_id, rel_id;
  logic [RW-1:0] push_reg, lb_reg;
  logic [AW-1:0] gac_rd_addr, lb_addr;

  rmi_lfc #(.DEPTH(D), .ENTRIES(N), .REG_W(RW), .ADDR_W(AW)) dut (.*);

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

  typedef struct { int unsigned id; int unsigned rd; } ld_t;
  ld_t mq [$];
  int n_pop = 0, n_wait = 0, n_full = 0;

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
    for (int i = 0; i < N; i++) begin g_valid[i] = 0; g_addr[i] = AW'(16'h1000 + i * 4); end
    push_en = 0; push_id = 0; push_reg = 0; lb_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Directed: valid address, empty queue -> out in the next cycle.
    @(negedge clk);
    g_valid[2] = 1;
    push_en = 1; push_id = 2; push_reg = 9; lb_ready = 1;
    #1 check(!lb_valid, "empty queue presents nothing");
    @(negedge clk);
    push_en = 0;
    #1 check(lb_valid && lb_addr == g_addr[2] && lb_reg == 9 && rel_en && rel_id == 2,
             "one-cycle forward of a ready load");
    @(negedge clk);
    #1 check(!lb_valid, "queue empty again");
    g_valid[2] = 0;
    // Random phase.
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
      push_en  = (mq.size() < D) && ($urandom_range(0, 9) < 5);
      push_id  = ID_W'($urandom_range(0, N-1));
      if (!g_valid[push_id] && $urandom_range(0, 1) == 1) push_en = 0;
      push_reg = RW'($urandom);
      lb_ready = ($urandom_range(0, 9) < 6);
      #1;
      check(full == (mq.size() == D), "full");
      exp_valid = mq.size() > 0 && g_valid[mq[0].id];
      check(lb_valid == exp_valid, "lb_valid");
      if (mq.size() == D) n_full++;
      if (mq.size() > 0 && !g_valid[mq[0].id]) n_wait++;
      if (exp_valid) begin
        check(lb_addr == g_addr[mq[0].id] && lb_reg == RW'(mq[0].rd), "lb_addr/lb_reg");
        check(rel_en == lb_ready && rel_id == ID_W'(mq[0].id), "release");
      end else check(!rel_en, "no release");
      @(posedge clk);
      if (exp_valid && lb_ready) begin void'(mq.pop_front()); n_pop++; end
      if (push_en) mq.push_back('{id: int'(push_id), rd: int'(push_reg)});
    end
    check(n_pop > 200 && n_wait > 100 && n_full > 20, "forwarding, waiting and full exercised");
    $display("forwarded=%0d waited=%0d full=%0d", n_pop, n_wait, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
