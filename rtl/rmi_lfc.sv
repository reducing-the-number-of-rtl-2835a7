// rmi_lfc: Load Forward Control (LFC) queue, Case A.
//
// A load whose address is already held in the Generated Address Cache is not
// issued. Instead its Entry ID and its destination register go into this
// queue. The queue watches the GAC Valid Bit of the entry at its head; once
// the address is there it hands address and destination register to the
// load buffer, which performs the memory access, and releases its use of the
// DLT entry (one Process Counter decrement).
//
// Interface (one clock, active-low asynchronous reset):
//  * push_en/push_id/push_reg: enqueue an eliminated load; full must be low.
//  * gac_rd_id -> gac_rd_valid/gac_rd_addr: a combinational GAC read port
//    for the head entry.
//  * lb_valid/lb_ready/lb_addr/lb_reg: valid/ready handshake to the load
//    buffer; a transfer happens in a cycle where both are high.
//  * rel_en/rel_id: the DLT entry whose use ends (same cycle as a transfer).
// lb_addr is gac_rd_addr passed straight through: the queue stores no
// address of its own, only the Entry ID that selects it in the GAC.
// A load pushed in one cycle can leave in the next at the earliest.
// Loads leave in the order they entered.
//
// Following the method: queue entries of Entry ID and register, forwarding
// when the address is ready. This design's own choices: FIFO order, the depth
// and the handshake.
module rmi_lfc #(
  parameter int unsigned DEPTH   = rmi_pkg::FWD_DEPTH,
  parameter int unsigned ENTRIES = rmi_pkg::DLT_ENTRIES,
  parameter int unsigned REG_W   = rmi_pkg::PREG_W,
  parameter int unsigned ADDR_W  = rmi_pkg::ADDR_W,
  localparam int unsigned ID_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned PTR_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push_en,
  input  logic [ID_W-1:0]   push_id,
  input  logic [REG_W-1:0]  push_reg,
  output logic              full,
  output logic [ID_W-1:0]   gac_rd_id,
  input  logic              gac_rd_valid,
  input  logic [ADDR_W-1:0] gac_rd_addr,
  output logic              lb_valid,
  input  logic              lb_ready,
  output logic [ADDR_W-1:0] lb_addr,
  output logic [REG_W-1:0]  lb_reg,
  output logic              rel_en,
  output logic [ID_W-1:0]   rel_id
);

  typedef struct packed {
    logic [ID_W-1:0]  id;
    logic [REG_W-1:0] rd;
  } lfc_entry_t;

  lfc_entry_t       q [DEPTH];
  logic [PTR_W-1:0] head, tail;
  logic [PTR_W:0]   count;

  logic pop;
  assign full      = count == (PTR_W+1)'(DEPTH);
  assign gac_rd_id = q[head].id;
  assign lb_valid  = count != '0 && gac_rd_valid;
  assign lb_addr   = gac_rd_addr;
  assign lb_reg    = q[head].rd;
  assign pop       = lb_valid && lb_ready;
  assign rel_en    = pop;
  assign rel_id    = q[head].id;

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      if (push_en) begin
        q[tail] <= '{id: push_id, rd: push_reg};
        tail    <= next_ptr(tail);
      end
      if (pop) head <= next_ptr(head);
      count <= count + (PTR_W+1)'(push_en) - (PTR_W+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push_en |-> !full);
  assert property (@(posedge clk) disable iff (!rst_n) lb_valid && !lb_ready |=> lb_valid);

endmodule
