// rmi_predecode: hardware Store-After-Load elimination in the prefetch /
// predecode stage of a RISC, VLIW or in-order superscalar pipeline.
//
// This is the hardware alternative to the compiler pass that feeds
// rmi_inorder. Instructions (one per cycle, in program order) pass through a
// short window of WIN entries before they leave for decode. Three pieces do
// the work:
//  * A table with one entry per logical register: {valid, base register,
//    offset, GAC slot}. A load "rd <- off(rs1)" fills the entry of rd and
//    is marked MARK_GEN with a new GAC slot (round robin), so its address
//    will be kept. A load whose base register and offset match a valid
//    entry finds its address already in that entry's slot: it is marked
//    MARK_LOAD with that slot instead, so rmi_inorder sends the cached
//    address to the load buffer, and it fills the entry of rd with the same
//    slot. An arithmetic instruction that reads its own destination
//    (rs1 == rd, as in "add R6,R6,4") keeps the entry; any other write of
//    rd clears it. A write of register x also clears every entry whose base is
//    x, and reassigning a GAC slot clears the entry that used it.
//  * A comparator: a store "off(rs1) <- rs2" is compared with the entry of
//    rs2. Equal base register and offset means the value in rs2 came from
//    that same location and the address is in the GAC slot.
//  * Marking logic: the youngest instruction in the window that writes rs2
//    is found. If it is an arithmetic instruction, not yet marked, with no
//    load or store between it and the store, it is marked MARK_STORE with
//    the slot, and the store is dropped (elim_o): its result will be written
//    to memory at the cached address by rmi_inorder.
//
// Interface: in_* / out_* are valid/ready instruction streams; out_mark and
// out_idx are added fields (rmi_pkg::rmi_mark_e and GAC slot). An
// instruction leaves the window when the window is full or when no new
// instruction arrives; once offered, it stays offered until taken. The
// window delays instructions by up to WIN cycles while it is filling. A
// dropped store is accepted in its cycle and produces no output.
//
// Following the method: a per-logical-register table, a comparator against
// the store, and a mark on the producing arithmetic instruction, placed in
// predecode; a load whose address was generated before goes to the load
// buffer with the cached address. This design's own choices: the window and its size, the
// round-robin slot assignment, the rule that keeps an entry across a
// read-modify-write, and the no-memory-access-in-between condition that
// keeps memory order intact.
module rmi_predecode #(
  parameter int unsigned WIN     = 4,
  parameter int unsigned ENTRIES = rmi_pkg::DLT_ENTRIES,
  parameter int unsigned REG_W   = 5,
  parameter int unsigned OFF_W   = rmi_pkg::OFF_W,
  parameter int unsigned PAY_W   = 16,
  localparam int unsigned ID_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned NREG   = 1 << REG_W,
  localparam int unsigned CW     = $clog2(WIN + 1),
  localparam int unsigned KW     = (WIN > 1) ? $clog2(WIN) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from fetch
  input  logic                 in_valid,
  output logic                 in_ready,
  input  rmi_pkg::rmi_op_e     in_op,
  input  logic [REG_W-1:0]     in_rd,
  input  logic [REG_W-1:0]     in_rs1,
  input  logic [REG_W-1:0]     in_rs2,
  input  logic [OFF_W-1:0]     in_off,
  input  logic [PAY_W-1:0]     in_pay,    // rest of the instruction, carried along
  // to decode
  output logic                 out_valid,
  input  logic                 out_ready,
  output rmi_pkg::rmi_op_e     out_op,
  output logic [REG_W-1:0]     out_rd,
  output logic [REG_W-1:0]     out_rs1,
  output logic [REG_W-1:0]     out_rs2,
  output logic [OFF_W-1:0]     out_off,
  output logic [PAY_W-1:0]     out_pay,
  output rmi_pkg::rmi_mark_e   out_mark,
  output logic [ID_W-1:0]      out_idx,
  output logic                 elim_o     // a store was dropped this cycle
);

  typedef struct packed {
    rmi_pkg::rmi_op_e   op;
    logic [REG_W-1:0]   rd;
    logic [REG_W-1:0]   rs1;
    logic [REG_W-1:0]   rs2;
    logic [OFF_W-1:0]   off;
    logic [PAY_W-1:0]   pay;
    rmi_pkg::rmi_mark_e mark;
    logic [ID_W-1:0]    idx;
  } ins_t;

  typedef struct packed {
    logic             valid;
    logic [REG_W-1:0] base;
    logic [OFF_W-1:0] off;
    logic [ID_W-1:0]  slot;
  } reg_entry_t;

  ins_t         win [WIN];      // win[0] oldest
  logic [CW-1:0] count;
  reg_entry_t   tbl [NREG];
  logic [ID_W-1:0] next_slot;

  function automatic logic writes_reg(rmi_pkg::rmi_op_e op);
    return op == rmi_pkg::OP_LOAD || op == rmi_pkg::OP_ALU;
  endfunction

  // ---- producer search and store comparison ------------------------------
  logic            found, prod_ok, mem_seen;
  logic [CW-1:0]   prod_k;
  always_comb begin
    found    = 1'b0;
    prod_ok  = 1'b0;
    mem_seen = 1'b0;
    prod_k   = '0;
    for (int k = WIN - 1; k >= 0; k--) begin
      if (CW'(k) < count && !found) begin
        if (writes_reg(win[k].op) && win[k].rd == in_rs2) begin
          found   = 1'b1;
          prod_k  = CW'(k);
          prod_ok = win[k].op == rmi_pkg::OP_ALU && win[k].mark == rmi_pkg::MARK_NONE && !mem_seen;
        end else if (win[k].op == rmi_pkg::OP_LOAD || win[k].op == rmi_pkg::OP_STORE) begin
          mem_seen = 1'b1;
        end
      end
    end
  end

  logic pop, push, elim, accept;
  logic offered;   // head was offered and not taken: keep offering it
  assign out_valid = count != '0 && (count == CW'(WIN) || !in_valid || offered);
  assign pop       = out_valid && out_ready;
  assign elim      = in_valid && in_op == rmi_pkg::OP_STORE && found && prod_ok &&
                     tbl[in_rs2].valid && tbl[in_rs2].base == in_rs1 &&
                     tbl[in_rs2].off == in_off && !(pop && prod_k == '0);
  assign in_ready  = elim || count < CW'(WIN) || pop;
  assign accept    = in_valid && in_ready;
  assign push      = accept && !elim;
  assign elim_o    = elim;

  assign out_op   = win[0].op;
  assign out_rd   = win[0].rd;
  assign out_rs1  = win[0].rs1;
  assign out_rs2  = win[0].rs2;
  assign out_off  = win[0].off;
  assign out_pay  = win[0].pay;
  assign out_mark = win[0].mark;
  assign out_idx  = win[0].idx;

  // ---- repeated load: address already kept in a GAC slot ------------------
  logic            ld_hit;
  logic [ID_W-1:0] ld_slot;
  always_comb begin
    ld_hit  = 1'b0;
    ld_slot = '0;
    for (int r = 0; r < NREG; r++)
      if (!ld_hit && tbl[r].valid && tbl[r].base == in_rs1 && tbl[r].off == in_off) begin
        ld_hit  = 1'b1;
        ld_slot = tbl[r].slot;
      end
  end

  // ---- window and table update ---------------------------------------------
  logic new_load, reuse_load;
  assign new_load   = push && in_op == rmi_pkg::OP_LOAD && in_rd != in_rs1 && !ld_hit;
  assign reuse_load = push && in_op == rmi_pkg::OP_LOAD && in_rd != in_rs1 && ld_hit;

  // window: mark the producer, shift out the oldest, append the newest
  ins_t          win_n [WIN];
  logic [CW-1:0] count_n;
  always_comb begin
    for (int k = 0; k < WIN; k++) win_n[k] = win[k];
    if (elim) begin
      win_n[KW'(prod_k)].mark = rmi_pkg::MARK_STORE;
      win_n[KW'(prod_k)].idx  = tbl[in_rs2].slot;
    end
    count_n = count;
    if (pop) begin
      for (int k = 0; k < WIN - 1; k++) win_n[k] = win_n[k+1];
      count_n = count_n - 1'b1;
    end
    if (push) begin
      win_n[KW'(count_n)] = '{op: in_op, rd: in_rd, rs1: in_rs1, rs2: in_rs2, off: in_off, pay: in_pay,
                              mark: new_load   ? rmi_pkg::MARK_GEN  :
                                    reuse_load ? rmi_pkg::MARK_LOAD : rmi_pkg::MARK_NONE,
                              idx: new_load ? next_slot : reuse_load ? ld_slot : '0};
      count_n = count_n + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      offered   <= 1'b0;
      next_slot <= '0;
      for (int k = 0; k < WIN; k++) win[k] <= '0;
      for (int r = 0; r < NREG; r++) tbl[r] <= '0;
    end else begin
      for (int k = 0; k < WIN; k++) win[k] <= win_n[k];
      count   <= count_n;
      offered <= out_valid && !out_ready;

      // per-register table
      if (push && writes_reg(in_op)) begin
        for (int r = 0; r < NREG; r++)
          if (tbl[r].base == in_rd || (new_load && tbl[r].slot == next_slot))
            tbl[r].valid <= 1'b0;
        if (new_load) begin
          tbl[in_rd] <= '{valid: 1'b1, base: in_rs1, off: in_off, slot: next_slot};
          next_slot  <= (next_slot == ID_W'(ENTRIES - 1)) ? '0 : next_slot + 1'b1;
        end else if (reuse_load) begin
          tbl[in_rd] <= '{valid: 1'b1, base: in_rs1, off: in_off, slot: ld_slot};
        end else if (!(in_op == rmi_pkg::OP_ALU && in_rs1 == in_rd)) begin
          tbl[in_rd].valid <= 1'b0;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid);
  assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(WIN));

endmodule
