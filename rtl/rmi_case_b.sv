// rmi_case_b: Case B realisation of Reduction of Memory Instructions (RMI)
// for an out-of-order superscalar processor.
//
// Case B targets the Store After Load pattern (load a variable, compute,
// store it back). It does not remove the store; it shortens its path. In the
// decode/rename stage, one memory instruction per cycle:
//  * Load: issued normally. It opens a new entry in the Dependence Lookup
//    Table (DLT) and the same entry in the Special Store Reservation Station
//    (SS RS); the entry number travels with the load (iss_tag_*) and the
//    execute stage writes the load's generated address into the SS RS entry
//    (agu_*). An older entry with the same base register and offset stops
//    matching, so a store always pairs with the most recent such load.
//  * Store: the DLT is searched for an entry opened by a load with the same
//    base register and offset and whose Process Bit is clear. On a match the
//    Process Bit is set and the store, with its ROB ID and its value (or the
//    register tag of the value), goes to that SS RS entry (dec_to_ssrs): it
//    gets no address generation and no execution unit. Otherwise it is
//    issued normally (dec_issue).
// The SS RS sends the store to the store buffer once the load's address and
// the store's value are there; the Process Bit is then cleared and the
// entry released. Entries of loads that no store uses stay until the LRU
// policy replaces them or their base register gets a new value
// (inv_en/inv_reg).
//
// Timing: the decode decision is combinational; tables change at the next
// clock edge. A store can reach the store buffer in the cycle after both
// the address and its value have arrived.
//
// Following the method: a DLT with a single Process Bit, entries assigned to
// every load in DLT and SS RS, the store match on register and offset, the
// SS RS fields and LRU replacement. This design's own choices: one memory
// instruction per cycle, the release of an entry after its store, the
// register-based invalidation and all sizes.
module rmi_case_b #(
  parameter int unsigned ENTRIES = rmi_pkg::DLT_ENTRIES,
  parameter int unsigned REG_W   = rmi_pkg::PREG_W,
  parameter int unsigned OFF_W   = rmi_pkg::OFF_W,
  parameter int unsigned ADDR_W  = rmi_pkg::ADDR_W,
  parameter int unsigned DATA_W  = rmi_pkg::DATA_W,
  parameter int unsigned ROB_W   = rmi_pkg::ROB_W,
  localparam int unsigned ID_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // decode: one load or store per cycle, registers already renamed
  input  logic              dec_valid,
  input  logic              dec_is_store,
  input  logic [REG_W-1:0]  dec_base,
  input  logic [OFF_W-1:0]  dec_off,
  input  logic [REG_W-1:0]  dec_reg,       // store: data source register
  input  logic              dec_data_rdy,
  input  logic [DATA_W-1:0] dec_data,
  input  logic [ROB_W-1:0]  dec_rob,       // store: its reorder-buffer entry
  output logic              dec_to_ssrs,   // store placed in the SS RS
  output logic              dec_issue,     // issued to the normal L/S RS
  output logic              iss_tag_valid, // load owns an SS RS entry
  output logic [ID_W-1:0]   iss_tag_id,
  // execute stage: address generated by a tagged load
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
  // store buffer
  output logic              sb_valid,
  input  logic              sb_ready,
  output logic [ADDR_W-1:0] sb_addr,
  output logic [DATA_W-1:0] sb_data,
  output logic [ROB_W-1:0]  sb_rob
);

  logic               lk_hit, lk_pbit;
  logic [ID_W-1:0]    lk_id;
  logic               alloc_req, alloc_ok;
  logic [ID_W-1:0]    alloc_id;
  logic [ENTRIES-1:0] pending, kill_mask, dlt_busy;
  logic               rel_en;
  logic [ID_W-1:0]    rel_id;
  logic               st_match, is_load;

  always_comb begin
    is_load       = dec_valid && !dec_is_store;
    st_match      = dec_valid && dec_is_store && lk_hit && !lk_pbit;
    dec_to_ssrs   = st_match;
    dec_issue     = dec_valid && !st_match;
    alloc_req     = is_load;
    iss_tag_valid = alloc_ok;
    iss_tag_id    = alloc_id;
    kill_mask     = '0;
    // a new load supersedes an older entry of the same reference
    if (is_load && lk_hit) kill_mask[lk_id] = 1'b1;
    // a store that has taken its address closes the entry
    if (rel_en) kill_mask[rel_id] = 1'b1;
  end

  rmi_dlt #(
    .ENTRIES(ENTRIES), .REG_W(REG_W), .OFF_W(OFF_W), .CNT_W(1), .NDEC(1)
  ) u_dlt (
    .clk, .rst_n,
    .lk_reg(dec_base), .lk_off(dec_off),
    .lk_hit, .lk_id, .lk_cnt_max(lk_pbit),
    .alloc_req, .alloc_reg(dec_base), .alloc_off(dec_off),
    .pinned(pending), .alloc_ok, .alloc_id,
    .inc_en(st_match), .inc_id(lk_id),
    .dec_en(rel_en), .dec_id(rel_id),
    .inv_en, .inv_reg, .kill_mask,
    .valid_o(), .busy_o(dlt_busy)
  );

  rmi_ss_rs #(
    .ENTRIES(ENTRIES), .REG_W(REG_W), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .ROB_W(ROB_W)
  ) u_ssrs (
    .clk, .rst_n,
    .open_en(alloc_ok), .open_id(alloc_id),
    .addr_en(agu_valid), .addr_id(agu_id), .addr(agu_addr),
    .st_en(st_match), .st_id(lk_id), .st_rob(dec_rob), .st_rdy(dec_data_rdy),
    .st_data(dec_data), .st_tag(dec_reg),
    .cdb_valid, .cdb_tag, .cdb_data,
    .sb_valid, .sb_ready, .sb_addr, .sb_data, .sb_rob,
    .rel_en, .rel_id,
    .pending_o(pending)
  );

  // The Process Bit is set exactly while a store waits in the SS RS entry.
  assert property (@(posedge clk) disable iff (!rst_n) rel_en |-> dlt_busy[rel_id]);
  assert property (@(posedge clk) disable iff (!rst_n) agu_valid |-> pending[agu_id]);

endmodule
