// rmi_ss_rs: Special Store Reservation Station (SS RS), Case B.
//
// In Case B every load opens an entry, with the same Entry ID as its entry in
// the Dependence Lookup Table. A later store with the same base register and
// offset is not sent to the normal load/store reservation station but into
// this entry: it needs no address generation and no execution unit, because
// the load writes the address it generates into the entry. Each entry holds:
//  * Address and its Valid Bit: cleared when a load opens the entry, set
//    when that load's address arrives.
//  * ROB ID of the store, for in-order retirement by the store buffer.
//  * Value and Result Valid: the store data, or, while Result Valid is low,
//    the register number of its producer, replaced by the value when that
//    register is broadcast on the Common Data Bus (CDB).
// When an entry has a store, a valid address and a valid value, it is
// dispatched to the store buffer (address, data, ROB ID). The lowest such
// entry goes first, one per cycle. Dispatch ends the entry: rel_en/rel_id
// tell the DLT to clear the Process Bit and drop the entry.
//
// Interface (one clock, active-low asynchronous reset):
//  * open_en/open_id: a load opens an entry.
//  * addr_en/addr_id/addr: the load's generated address.
//  * st_en/st_id/st_rob/st_rdy/st_data/st_tag: a store enters an entry.
//  * cdb_valid/cdb_tag/cdb_data: result broadcast, also seen by a store
//    entering in the same cycle.
//  * sb_valid/sb_ready/sb_addr/sb_data/sb_rob: handshake to the store buffer.
//  * pending_o: entries opened whose address has not arrived.
// A store whose address and value are present when it enters can leave in
// the next cycle.
//
// Following the method: the field list, the Valid Bit protocol and CDB
// update. This design's own choices: lowest-index dispatch, the handshake and
// that an entry closes when its store leaves.
module rmi_ss_rs #(
  parameter int unsigned ENTRIES = rmi_pkg::DLT_ENTRIES,
  parameter int unsigned REG_W   = rmi_pkg::PREG_W,
  parameter int unsigned ADDR_W  = rmi_pkg::ADDR_W,
  parameter int unsigned DATA_W  = rmi_pkg::DATA_W,
  parameter int unsigned ROB_W   = rmi_pkg::ROB_W,
  localparam int unsigned ID_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              open_en,
  input  logic [ID_W-1:0]   open_id,
  input  logic              addr_en,
  input  logic [ID_W-1:0]   addr_id,
  input  logic [ADDR_W-1:0] addr,
  input  logic              st_en,
  input  logic [ID_W-1:0]   st_id,
  input  logic [ROB_W-1:0]  st_rob,
  input  logic              st_rdy,
  input  logic [DATA_W-1:0] st_data,
  input  logic [REG_W-1:0]  st_tag,
  input  logic              cdb_valid,
  input  logic [REG_W-1:0]  cdb_tag,
  input  logic [DATA_W-1:0] cdb_data,
  output logic              sb_valid,
  input  logic              sb_ready,
  output logic [ADDR_W-1:0] sb_addr,
  output logic [DATA_W-1:0] sb_data,
  output logic [ROB_W-1:0]  sb_rob,
  output logic              rel_en,
  output logic [ID_W-1:0]   rel_id,
  output logic [ENTRIES-1:0] pending_o
);

  typedef struct packed {
    logic              open;       // opened by a load
    logic              addr_valid; // Valid Bit
    logic [ADDR_W-1:0] addr;
    logic              st;         // a store waits here
    logic [ROB_W-1:0]  rob;
    logic              rdy;        // Result Valid
    logic [REG_W-1:0]  tag;
    logic [DATA_W-1:0] value;
  } ssrs_entry_t;

  ssrs_entry_t rs [ENTRIES];

  logic            sel_valid;
  logic [ID_W-1:0] sel_id;
  always_comb begin
    sel_valid = 1'b0;
    sel_id    = '0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (!sel_valid && rs[i].st && rs[i].rdy && rs[i].addr_valid) begin
        sel_valid = 1'b1;
        sel_id    = ID_W'(i);
      end
  end

  assign sb_valid = sel_valid;
  assign sb_addr  = rs[sel_id].addr;
  assign sb_data  = rs[sel_id].value;
  assign sb_rob   = rs[sel_id].rob;
  assign rel_en   = sel_valid && sb_ready;
  assign rel_id   = sel_id;

  always_comb
    for (int unsigned i = 0; i < ENTRIES; i++)
      pending_o[i] = rs[i].open && !rs[i].addr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < ENTRIES; i++) rs[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        if (cdb_valid && rs[i].st && !rs[i].rdy && rs[i].tag == cdb_tag) begin
          rs[i].rdy   <= 1'b1;
          rs[i].value <= cdb_data;
        end
        if (addr_en && addr_id == ID_W'(i)) begin
          rs[i].addr       <= addr;
          rs[i].addr_valid <= 1'b1;
        end
        if (rel_en && sel_id == ID_W'(i)) begin
          rs[i].st   <= 1'b0;
          rs[i].open <= 1'b0;
        end
        if (st_en && st_id == ID_W'(i)) begin
          rs[i].st  <= 1'b1;
          rs[i].rob <= st_rob;
          rs[i].tag <= st_tag;
          if (st_rdy) begin
            rs[i].rdy   <= 1'b1;
            rs[i].value <= st_data;
          end else if (cdb_valid && cdb_tag == st_tag) begin
            rs[i].rdy   <= 1'b1;
            rs[i].value <= cdb_data;
          end else begin
            rs[i].rdy   <= 1'b0;
          end
        end
        if (open_en && open_id == ID_W'(i)) begin
          rs[i].open       <= 1'b1;
          rs[i].addr_valid <= 1'b0;
          rs[i].st         <= 1'b0;
        end
      end
    end
  end

  // A store only enters an entry without one; a load only opens an idle entry.
  assert property (@(posedge clk) disable iff (!rst_n) st_en |-> !rs[st_id].st);
  assert property (@(posedge clk) disable iff (!rst_n)
    open_en |-> !rs[open_id].st && !pending_o[open_id]);
  assert property (@(posedge clk) disable iff (!rst_n) sb_valid && !sb_ready |=> sb_valid);

endmodule
