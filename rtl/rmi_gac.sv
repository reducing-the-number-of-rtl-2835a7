// rmi_gac: Generated Address Cache (GAC).
//
// The GAC keeps the memory addresses produced by address generation so that
// later memory instructions with the same address need not compute them
// again. It sits after the execute stage: an address-generating load or
// store that was given a Dependence Lookup Table entry writes its address
// here, in the slot named by that Entry ID (the GAC is indexed by Entry ID,
// not by register number). Each slot has a Valid Bit telling whether its
// address is present.
//
// Interface (one clock, active-low asynchronous reset):
//  * clr_en/clr_id: a new DLT entry was assigned; the slot's Valid Bit is
//    cleared and the slot is marked pending until its address arrives.
//  * wr_en/wr_id/wr_addr: the execute stage produced the address of the
//    slot; Valid Bit set, pending cleared. A clear of the same slot in the
//    same cycle wins.
//  * NRD combinational read ports: rd_id -> rd_valid, rd_addr.
//  * pending_o: slots waiting for their address (the DLT must not reassign
//    them).
// A write is visible on the read ports in the next cycle.
//
// Following the method: addresses plus a Valid Bit, indexed by Entry ID,
// written after execute. This design's own choices: the pending flag and the
// number of read ports.
module rmi_gac #(
  parameter int unsigned ENTRIES = rmi_pkg::DLT_ENTRIES,
  parameter int unsigned ADDR_W  = rmi_pkg::ADDR_W,
  parameter int unsigned NRD     = 2,
  localparam int unsigned ID_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clr_en,
  input  logic [ID_W-1:0]           clr_id,
  input  logic                      wr_en,
  input  logic [ID_W-1:0]           wr_id,
  input  logic [ADDR_W-1:0]         wr_addr,
  input  logic [NRD-1:0][ID_W-1:0]  rd_id,
  output logic [NRD-1:0]            rd_valid,
  output logic [NRD-1:0][ADDR_W-1:0] rd_addr,
  output logic [ENTRIES-1:0]        pending_o
);

  logic [ADDR_W-1:0]  addr    [ENTRIES];
  logic [ENTRIES-1:0] valid;
  logic [ENTRIES-1:0] pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= '0;
      pending <= '0;
    end else begin
      if (wr_en) begin
        valid[wr_id]   <= 1'b1;
        pending[wr_id] <= 1'b0;
      end
      if (clr_en) begin
        valid[clr_id]   <= 1'b0;
        pending[clr_id] <= 1'b1;
      end
    end
  end

  // Address storage has no reset: a slot is read only when its Valid Bit is set.
  always_ff @(posedge clk)
    if (wr_en && !(clr_en && clr_id == wr_id)) addr[wr_id] <= wr_addr;

  always_comb
    for (int unsigned r = 0; r < NRD; r++) begin
      rd_valid[r] = valid[rd_id[r]];
      rd_addr[r]  = addr[rd_id[r]];
    end

  assign pending_o = pending;

  // An address only arrives for a slot that is waiting for one.
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> pending[wr_id]);

endmodule
