// rmi_sfc: Store Forward Control (SFC) queue, Case A.
//
// A store whose address is already held in the Generated Address Cache is not
// issued and takes no reorder-buffer entry. Its Entry ID and its Value go
// into this queue instead. If the value to be stored is not yet computed the
// Value field holds the register number (tag) of the producer, and the entry
// watches the Common Data Bus (CDB) for that tag to pick up the result. The
// head entry leaves when its value is present and its GAC address is valid:
// address and data go to the store buffer and the use of the DLT entry ends
// (one Process Counter decrement).
//
// Interface (one clock, active-low asynchronous reset):
//  * push_en/push_id/push_rdy/push_data/push_tag: enqueue an eliminated
//    store; push_rdy says push_data already holds the value, otherwise
//    push_tag names the register that will bring it on the CDB. full must
//    be low.
//  * cdb_valid/cdb_tag/cdb_data: one result broadcast per cycle; a result
//    on the CDB in the cycle of the push is captured too.
//  * gac_rd_id -> gac_rd_valid/gac_rd_addr: combinational GAC read port.
//  * sb_valid/sb_ready/sb_addr/sb_data: handshake to the store buffer.
//  * rel_en/rel_id: the DLT entry whose use ends.
// sb_addr is gac_rd_addr passed straight through: the queue stores no
// address of its own, only the Entry ID that selects it in the GAC.
// Stores leave in the order they entered; a value captured from the CDB can
// leave in the next cycle.
//
// Following the method: queue entries of Entry ID and Value, value update from
// the CDB, forwarding when address and data are ready. This design's own
// choices: FIFO order, the depth, a single CDB and the handshake.
module rmi_sfc #(
  parameter int unsigned DEPTH   = rmi_pkg::FWD_DEPTH,
  parameter int unsigned ENTRIES = rmi_pkg::DLT_ENTRIES,
  parameter int unsigned REG_W   = rmi_pkg::PREG_W,
  parameter int unsigned ADDR_W  = rmi_pkg::ADDR_W,
  parameter int unsigned DATA_W  = rmi_pkg::DATA_W,
  localparam int unsigned ID_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned PTR_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push_en,
  input  logic [ID_W-1:0]   push_id,
  input  logic              push_rdy,
  input  logic [DATA_W-1:0] push_data,
  input  logic [REG_W-1:0]  push_tag,
  output logic              full,
  input  logic              cdb_valid,
  input  logic [REG_W-1:0]  cdb_tag,
  input  logic [DATA_W-1:0] cdb_data,
  output logic [ID_W-1:0]   gac_rd_id,
  input  logic              gac_rd_valid,
  input  logic [ADDR_W-1:0] gac_rd_addr,
  output logic              sb_valid,
  input  logic              sb_ready,
  output logic [ADDR_W-1:0] sb_addr,
  output logic [DATA_W-1:0] sb_data,
  output logic              rel_en,
  output logic [ID_W-1:0]   rel_id
);

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic              rdy;    // Result Valid
    logic [REG_W-1:0]  tag;
    logic [DATA_W-1:0] value;
  } sfc_entry_t;

  sfc_entry_t       q [DEPTH];
  logic [PTR_W-1:0] head, tail;
  logic [PTR_W:0]   count;

  logic pop;
  assign full      = count == (PTR_W+1)'(DEPTH);
  assign gac_rd_id = q[head].id;
  assign sb_valid  = count != '0 && q[head].rdy && gac_rd_valid;
  assign sb_addr   = gac_rd_addr;
  assign sb_data   = q[head].value;
  assign pop       = sb_valid && sb_ready;
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
      // CDB snoop: waiting entries pick up the result of their producer.
      for (int unsigned i = 0; i < DEPTH; i++)
        if (cdb_valid && !q[i].rdy && q[i].tag == cdb_tag) begin
          q[i].rdy   <= 1'b1;
          q[i].value <= cdb_data;
        end
      if (push_en) begin
        if (push_rdy)
          q[tail] <= '{id: push_id, rdy: 1'b1, tag: push_tag, value: push_data};
        else if (cdb_valid && cdb_tag == push_tag)
          q[tail] <= '{id: push_id, rdy: 1'b1, tag: push_tag, value: cdb_data};
        else
          q[tail] <= '{id: push_id, rdy: 1'b0, tag: push_tag, value: '0};
        tail <= next_ptr(tail);
      end
      if (pop) head <= next_ptr(head);
      count <= count + (PTR_W+1)'(push_en) - (PTR_W+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push_en |-> !full);
  assert property (@(posedge clk) disable iff (!rst_n) sb_valid && !sb_ready |=> sb_valid);

endmodule
