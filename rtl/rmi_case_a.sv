// rmi_case_a: Case A realisation of Reduction of Memory Instructions (RMI)
// for an out-of-order superscalar processor.
//
// Sits in the decode/rename stage, after register renaming, and sees one
// memory instruction per cycle with its physical base register and offset.
// The Dependence Lookup Table (DLT) is searched for an entry with the same
// base register and offset:
//  * Hit: the address was already generated (or is being generated) by an
//    earlier load or store and is, or will be, in the Generated Address
//    Cache (GAC). The instruction is eliminated: it is not issued, takes no
//    reservation station, execution unit or reorder-buffer entry. A load goes
//    to the Load Forward Control queue (LFC) with its destination register; a
//    store goes to the Store Forward Control queue (SFC) with its value or the
//    tag of the value's producer. The entry's Process Counter counts it as a
//    user until the queue hands the access to the load or store buffer.
//  * Miss: the instruction is issued normally to the load/store reservation
//    station. If an entry can be assigned (LRU among entries with a zero
//    Process Counter and no address outstanding), the instruction carries its
//    Entry ID (iss_tag_valid/iss_tag_id); when its address is generated the
//    execute stage writes it into the GAC through agu_*.
//  * Hit that cannot be taken (Process Counter saturated or queue full): the
//    instruction is issued normally without an Entry ID.
// Entries stay after use so that later instructions can reuse the address.
// When a physical register receives a new value (inv_en/inv_reg: renamer
// reallocating it) the entries based on it stop matching.
//
// Timing: the decision (dec_elim / dec_issue) is combinational in the cycle
// dec_valid is high; the tables change at the next clock edge. An eliminated
// access reaches the load or store buffer no earlier than the cycle after
// the address is written into the GAC (and, for a store, after its value is
// present).
//
// Following the method: the DLT/GAC/LFC/SFC structure, matching on register
// and offset, no issue for a matching instruction, value capture from the
// Common Data Bus, LRU replacement respecting the Process Counter. This
// design's own choices: one memory instruction per cycle, the fall-back to
// normal issue, register-based invalidation and all sizes.
module rmi_case_a #(
  parameter int unsigned ENTRIES = rmi_pkg::DLT_ENTRIES,
  parameter int unsigned DEPTH   = rmi_pkg::FWD_DEPTH,
  parameter int unsigned REG_W   = rmi_pkg::PREG_W,
  parameter int unsigned OFF_W   = rmi_pkg::OFF_W,
  parameter int unsigned ADDR_W  = rmi_pkg::ADDR_W,
  parameter int unsigned DATA_W  = rmi_pkg::DATA_W,
  parameter int unsigned CNT_W   = rmi_pkg::PCNT_W,
  localparam int unsigned ID_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // decode: one load or store per cycle, registers already renamed
  input  logic              dec_valid,
  input  logic              dec_is_store,
  input  logic [REG_W-1:0]  dec_base,
  input  logic [OFF_W-1:0]  dec_off,
  input  logic [REG_W-1:0]  dec_reg,       // load: destination; store: data source
  input  logic              dec_data_rdy,  // store: source value already available
  input  logic [DATA_W-1:0] dec_data,
  output logic              dec_elim,      // not issued, forwarded to LFC/SFC
  output logic              dec_issue,     // issued to the normal L/S RS
  output logic              iss_tag_valid, // the issued instruction owns a GAC slot
  output logic [ID_W-1:0]   iss_tag_id,
  // execute stage: generated address of a tagged instruction
  input  logic              agu_valid,
  input  logic [ID_W-1:0]   agu_id,
  input  logic [ADDR_W-1:0] agu_addr,
  // common data bus
  input  logic              cdb_valid,
  input  logic [REG_W-1:0]  cdb_tag,
  input  logic [DATA_W-1:0] cdb_data,
  // a physical register gets a new value
  input  logic              inv_en,
  input  logic [REG_W-1:0]  inv_reg,
  // load buffer
  output logic              lb_valid,
  input  logic              lb_ready,
  output logic [ADDR_W-1:0] lb_addr,
  output logic [REG_W-1:0]  lb_reg,
  // store buffer
  output logic              sb_valid,
  input  logic              sb_ready,
  output logic [ADDR_W-1:0] sb_addr,
  output logic [DATA_W-1:0] sb_data
);

  logic                   lk_hit, lk_cnt_max;
  logic [ID_W-1:0]        lk_id;
  logic                   alloc_req, alloc_ok;
  logic [ID_W-1:0]        alloc_id;
  logic [ENTRIES-1:0]     gac_pending, dlt_busy;
  logic                   lfc_full, sfc_full;
  logic                   lfc_rel, sfc_rel;
  logic [ID_W-1:0]        lfc_rel_id, sfc_rel_id;
  logic [1:0][ID_W-1:0]   gac_rd_id;
  logic [1:0]             gac_rd_valid;
  logic [1:0][ADDR_W-1:0] gac_rd_addr;
  logic                   can_elim;

  // ---- decode decision ----------------------------------------------------
  always_comb begin
    can_elim      = lk_hit && !lk_cnt_max && (dec_is_store ? !sfc_full : !lfc_full);
    dec_elim      = dec_valid && can_elim;
    dec_issue     = dec_valid && !can_elim;
    alloc_req     = dec_valid && !lk_hit;
    iss_tag_valid = alloc_ok;
    iss_tag_id    = alloc_id;
  end

  rmi_dlt #(
    .ENTRIES(ENTRIES), .REG_W(REG_W), .OFF_W(OFF_W), .CNT_W(CNT_W), .NDEC(2)
  ) u_dlt (
    .clk, .rst_n,
    .lk_reg(dec_base), .lk_off(dec_off),
    .lk_hit, .lk_id, .lk_cnt_max,
    .alloc_req, .alloc_reg(dec_base), .alloc_off(dec_off),
    .pinned(gac_pending), .alloc_ok, .alloc_id,
    .inc_en(dec_elim), .inc_id(lk_id),
    .dec_en({sfc_rel, lfc_rel}), .dec_id({sfc_rel_id, lfc_rel_id}),
    .inv_en, .inv_reg, .kill_mask('0),
    .valid_o(), .busy_o(dlt_busy)
  );

  rmi_gac #(.ENTRIES(ENTRIES), .ADDR_W(ADDR_W), .NRD(2)) u_gac (
    .clk, .rst_n,
    .clr_en(alloc_ok), .clr_id(alloc_id),
    .wr_en(agu_valid), .wr_id(agu_id), .wr_addr(agu_addr),
    .rd_id(gac_rd_id), .rd_valid(gac_rd_valid), .rd_addr(gac_rd_addr),
    .pending_o(gac_pending)
  );

  rmi_lfc #(
    .DEPTH(DEPTH), .ENTRIES(ENTRIES), .REG_W(REG_W), .ADDR_W(ADDR_W)
  ) u_lfc (
    .clk, .rst_n,
    .push_en(dec_elim && !dec_is_store), .push_id(lk_id), .push_reg(dec_reg),
    .full(lfc_full),
    .gac_rd_id(gac_rd_id[0]), .gac_rd_valid(gac_rd_valid[0]), .gac_rd_addr(gac_rd_addr[0]),
    .lb_valid, .lb_ready, .lb_addr, .lb_reg,
    .rel_en(lfc_rel), .rel_id(lfc_rel_id)
  );

  rmi_sfc #(
    .DEPTH(DEPTH), .ENTRIES(ENTRIES), .REG_W(REG_W), .ADDR_W(ADDR_W), .DATA_W(DATA_W)
  ) u_sfc (
    .clk, .rst_n,
    .push_en(dec_elim && dec_is_store), .push_id(lk_id), .push_rdy(dec_data_rdy),
    .push_data(dec_data), .push_tag(dec_reg), .full(sfc_full),
    .cdb_valid, .cdb_tag, .cdb_data,
    .gac_rd_id(gac_rd_id[1]), .gac_rd_valid(gac_rd_valid[1]), .gac_rd_addr(gac_rd_addr[1]),
    .sb_valid, .sb_ready, .sb_addr, .sb_data,
    .rel_en(sfc_rel), .rel_id(sfc_rel_id)
  );

  // An eliminated instruction always refers to an entry that is still counted.
  assert property (@(posedge clk) disable iff (!rst_n)
    lfc_rel |-> dlt_busy[lfc_rel_id]);
  assert property (@(posedge clk) disable iff (!rst_n)
    sfc_rel |-> dlt_busy[sfc_rel_id]);
  // The address generator only writes slots that are waiting for an address.
  assert property (@(posedge clk) disable iff (!rst_n)
    agu_valid |-> gac_pending[agu_id]);

endmodule
