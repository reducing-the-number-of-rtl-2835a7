// rmi_gac_tb: self-checking test of the Generated Address Cache.
//
// A model keeps, per slot, the address, the Valid Bit and the pending flag.
// Random slot clears (new DLT entries) and address writes (only to slots
// waiting for an address, as the DLT guarantees) are applied, including a
// clear and a write of the same slot in one cycle, and both read ports and
// pending_o are compared with the model every cycle.
module rmi_gac_tb;
  localparam int unsigned N = 4, AW = 16, ID_W = 2, CYCLES = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clr_en, wr_en;
  logic [ID_W-1:0] clr_id, wr_id;
  logic [AW-1:0] wr_addr;
  logic [1:0][ID_W-1:0] rd_id;
  logic [1:0] rd_valid;
  logic [1:0][AW-1:0] rd_addr;
  logic [N-1:0] pending_o;

  rmi_gac #(.ENTRIES(N), .ADDR_W(AW), .NRD(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  bit m_valid [N], m_pend [N];
  logic [AW-1:0] m_addr [N];
  int n_same = 0, n_wr = 0;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    for (int i = 0; i < N; i++) begin m_valid[i] = 0; m_pend[i] = 0; m_addr[i] = 0; end
    clr_en = 0; wr_en = 0; clr_id = 0; wr_id = 0; wr_addr = 0; rd_id = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      clr_en = ($urandom_range(0, 3) == 0);
      clr_id = ID_W'($urandom_range(0, N-1));
      wr_en = 0;
      wr_id = ID_W'($urandom_range(0, N-1));
      if (m_pend[wr_id] && $urandom_range(0, 1) == 1) wr_en = 1;
      if (clr_en && wr_en && $urandom_range(0, 1) == 1) clr_id = wr_id;
      wr_addr = AW'($urandom);
      rd_id[0] = ID_W'($urandom_range(0, N-1));
      rd_id[1] = ID_W'($urandom_range(0, N-1));
      #1;
      for (int r = 0; r < 2; r++) begin
        check(rd_valid[r] == m_valid[rd_id[r]], "rd_valid");
        if (m_valid[rd_id[r]]) check(rd_addr[r] == m_addr[rd_id[r]], "rd_addr");
      end
      for (int i = 0; i < N; i++) check(pending_o[i] == m_pend[i], "pending_o");
      @(posedge clk);
      if (wr_en) begin
        n_wr++;
        if (!(clr_en && clr_id == wr_id)) begin
          m_valid[wr_id] = 1; m_pend[wr_id] = 0; m_addr[wr_id] = wr_addr;
        end else n_same++;
      end
      if (clr_en) begin m_valid[clr_id] = 0; m_pend[clr_id] = 1; end
    end
    check(n_wr > 200 && n_same > 5, "writes and same-slot conflicts exercised");
    $display("writes=%0d conflicts=%0d", n_wr, n_same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
