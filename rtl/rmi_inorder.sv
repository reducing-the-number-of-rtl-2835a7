// rmi_inorder: RMI support after the execute stage of a RISC, VLIW or in-order
// superscalar pipeline.
//
// For these processors the address-dependence analysis is done before the
// pipeline: by the compiler, or in hardware by the predecode logic
// (rmi_predecode). Either one keeps the addresses it wants reused in a Generated Address
// Cache (GAC) whose slots it assigns, removes a store whose address an
// earlier memory instruction already generated, and marks the arithmetic
// instruction producing the stored value, adding the GAC slot number. The
// hardware here acts on those marks (rmi_pkg::rmi_mark_e) as instructions
// leave the execute stage, one per cycle:
//  * MARK_GEN: a load or store whose address ex_addr was just generated;
//    the address is written into GAC[ex_idx]. The access itself continues
//    down the normal pipeline.
//  * MARK_STORE: the arithmetic result ex_result also goes, with the address
//    in GAC[ex_idx], to the write buffer (wb_*): this replaces the store.
//  * MARK_LOAD: a load that skipped address generation; address GAC[ex_idx]
//    and destination register ex_rd go to the load buffer (lb_*).
// A mark that needs a GAC slot whose Valid Bit is clear cannot be served and
// raises miss_o for one cycle (correct marking never produces it).
//
// Timing: one register stage. A marked instruction accepted in cycle t is
// presented to its buffer in cycle t+1 and held until accepted. ex_ready is
// low while the output register holds an access its buffer has not taken;
// the execute stage must then hold its instruction. A GAC write in cycle t
// is seen by a mark in cycle t+1.
//
// Following the method: the GAC after the execute stage, the mark and slot
// field on the arithmetic instruction, forwarding of result plus address to
// the write buffer, forwarding of address plus register to the load buffer.
// This design's own choices: compiler-assigned slot numbers, one instruction
// per cycle, the output register and the handshake.
module rmi_inorder #(
  parameter int unsigned ENTRIES = rmi_pkg::DLT_ENTRIES,
  parameter int unsigned REG_W   = 5,
  parameter int unsigned ADDR_W  = rmi_pkg::ADDR_W,
  parameter int unsigned DATA_W  = rmi_pkg::DATA_W,
  localparam int unsigned ID_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // execute stage output
  input  logic              ex_valid,
  input  rmi_pkg::rmi_mark_e         ex_mark,
  input  logic [ID_W-1:0]   ex_idx,
  input  logic [ADDR_W-1:0] ex_addr,
  input  logic [DATA_W-1:0] ex_result,
  input  logic [REG_W-1:0]  ex_rd,
  output logic              ex_ready,
  output logic              miss_o,
  // write buffer
  output logic              wb_valid,
  input  logic              wb_ready,
  output logic [ADDR_W-1:0] wb_addr,
  output logic [DATA_W-1:0] wb_data,
  // load buffer
  output logic              lb_valid,
  input  logic              lb_ready,
  output logic [ADDR_W-1:0] lb_addr,
  output logic [REG_W-1:0]  lb_reg
);

  logic [ADDR_W-1:0]  gac_addr  [ENTRIES];
  logic [ENTRIES-1:0] gac_valid;

  logic              take, hit;
  logic              nxt_wb, nxt_lb;
  assign ex_ready = !(wb_valid && !wb_ready) && !(lb_valid && !lb_ready);
  assign take     = ex_valid && ex_ready;
  assign hit      = gac_valid[ex_idx];
  assign nxt_wb   = take && ex_mark == rmi_pkg::MARK_STORE && hit;
  assign nxt_lb   = take && ex_mark == rmi_pkg::MARK_LOAD && hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gac_valid <= '0;
      wb_valid  <= 1'b0;
      lb_valid  <= 1'b0;
      miss_o    <= 1'b0;
      wb_addr   <= '0;
      wb_data   <= '0;
      lb_addr   <= '0;
      lb_reg    <= '0;
    end else begin
      if (take && ex_mark == rmi_pkg::MARK_GEN) gac_valid[ex_idx] <= 1'b1;
      miss_o <= take && (ex_mark == rmi_pkg::MARK_STORE || ex_mark == rmi_pkg::MARK_LOAD) && !hit;
      if (wb_valid && wb_ready) wb_valid <= 1'b0;
      if (lb_valid && lb_ready) lb_valid <= 1'b0;
      if (nxt_wb) begin
        wb_valid <= 1'b1;
        wb_addr  <= gac_addr[ex_idx];
        wb_data  <= ex_result;
      end
      if (nxt_lb) begin
        lb_valid <= 1'b1;
        lb_addr  <= gac_addr[ex_idx];
        lb_reg   <= ex_rd;
      end
    end
  end

  always_ff @(posedge clk)
    if (take && ex_mark == rmi_pkg::MARK_GEN) gac_addr[ex_idx] <= ex_addr;

  assert property (@(posedge clk) disable iff (!rst_n) wb_valid && !wb_ready |=> wb_valid);
  assert property (@(posedge clk) disable iff (!rst_n) lb_valid && !lb_ready |=> lb_valid);

endmodule
