// rmi_dlt: Dependence Lookup Table (DLT).
//
// The DLT records, per entry, the memory reference of a load or store whose
// address is being (or has been) generated: its base register and its
// offset. A later memory instruction with the same base register and offset
// depends on the same address, so its address need not be computed again;
// the matching entry's number (Entry ID) then names the slot of the address
// in the Generated Address Cache or the Special Store Reservation Station.
//
// Each entry also carries a Process Counter: the number of instructions that
// still rely on the entry. An entry whose counter is not zero is never
// replaced. In the Case A realisation the counter is several bits wide; in
// Case B it is a single Process Bit (CNT_W = 1). Replacement is LRU among the
// entries that are free to go: an entry with a zero counter whose `pinned`
// input bit is clear (the owner of the address table pins an entry while its
// address is still being generated). An unused entry is taken before any
// used one.
//
// Interface, all in one clock domain, active-low asynchronous reset:
//  * lookup (combinational): lk_reg/lk_off -> lk_hit, lk_id, lk_cnt_max.
//  * allocation (combinational choice, committed at the clock edge):
//    alloc_req with alloc_reg/alloc_off -> alloc_ok, alloc_id. The new entry
//    becomes valid with a zero counter and most recently used.
//  * inc_en/inc_id: add one user to an entry and mark it most recently used.
//  * dec_en/dec_id (NDEC ports): remove one user each.
//  * inv_en/inv_reg: the register inv_reg gets a new value; every entry with
//    that base register stops matching (its counter keeps running so users
//    already holding the Entry ID finish).
//  * kill_mask: entries that stop matching (used when an entry is consumed).
// Invalidation and kill act before an allocation in the same cycle.
// The table is written only at the clock edge; a lookup in the cycle of an
// allocation sees the old contents.
//
// Following the method: the fields (register, offset, Process Counter or
// Process Bit), matching on equal register and offset, and LRU replacement
// that respects the counter. This design's own choices: the table size,
// invalidation by base register, the pinned input and one allocation per
// cycle.
module rmi_dlt #(
  parameter int unsigned ENTRIES = rmi_pkg::DLT_ENTRIES,
  parameter int unsigned REG_W   = rmi_pkg::PREG_W,
  parameter int unsigned OFF_W   = rmi_pkg::OFF_W,
  parameter int unsigned CNT_W   = rmi_pkg::PCNT_W,
  parameter int unsigned NDEC    = 2,
  localparam int unsigned ID_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // lookup
  input  logic [REG_W-1:0]           lk_reg,
  input  logic [OFF_W-1:0]           lk_off,
  output logic                       lk_hit,
  output logic [ID_W-1:0]            lk_id,
  output logic                       lk_cnt_max,
  // allocation
  input  logic                       alloc_req,
  input  logic [REG_W-1:0]           alloc_reg,
  input  logic [OFF_W-1:0]           alloc_off,
  input  logic [ENTRIES-1:0]         pinned,
  output logic                       alloc_ok,
  output logic [ID_W-1:0]            alloc_id,
  // process counter
  input  logic                       inc_en,
  input  logic [ID_W-1:0]            inc_id,
  input  logic [NDEC-1:0]            dec_en,
  input  logic [NDEC-1:0][ID_W-1:0]  dec_id,
  // invalidation
  input  logic                       inv_en,
  input  logic [REG_W-1:0]           inv_reg,
  input  logic [ENTRIES-1:0]         kill_mask,
  // status
  output logic [ENTRIES-1:0]         valid_o,
  output logic [ENTRIES-1:0]         busy_o
);

  typedef struct packed {
    logic             valid;
    logic [REG_W-1:0] base;
    logic [OFF_W-1:0] off;
    logic [CNT_W-1:0] pcnt;
  } dlt_entry_t;

  dlt_entry_t          tbl [ENTRIES];
  // LRU rank per entry: 0 = most recently used, ENTRIES-1 = least.
  logic [ID_W-1:0]     age [ENTRIES];

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  // ---- lookup -----------------------------------------------------------
  always_comb begin
    lk_hit = 1'b0;
    lk_id  = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!lk_hit && tbl[i].valid && tbl[i].base == lk_reg && tbl[i].off == lk_off) begin
        lk_hit = 1'b1;
        lk_id  = ID_W'(i);
      end
    end
    lk_cnt_max = lk_hit && (tbl[lk_id].pcnt == CNT_MAX);
  end

  // ---- victim choice ----------------------------------------------------
  logic            have_free, have_old;
  logic [ID_W-1:0] free_id, old_id;
  always_comb begin
    have_free = 1'b0;
    have_old  = 1'b0;
    free_id   = '0;
    old_id    = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (tbl[i].pcnt == '0 && !pinned[i]) begin
        if (!tbl[i].valid) begin
          if (!have_free) begin
            have_free = 1'b1;
            free_id   = ID_W'(i);
          end
        end else if (!have_old || age[i] > age[old_id]) begin
          have_old = 1'b1;
          old_id   = ID_W'(i);
        end
      end
    end
    alloc_ok = alloc_req && (have_free || have_old);
    alloc_id = have_free ? free_id : old_id;
  end

  // ---- update -----------------------------------------------------------
  logic            touch;
  logic [ID_W-1:0] touch_id;
  assign touch    = alloc_ok || inc_en;
  assign touch_id = alloc_ok ? alloc_id : inc_id;

  // next value of each Process Counter: one possible increment and up to
  // NDEC decrements in the same cycle
  logic [CNT_W-1:0] cnt_n [ENTRIES];
  always_comb
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      cnt_n[i] = tbl[i].pcnt;
      if (inc_en && inc_id == ID_W'(i)) cnt_n[i] = cnt_n[i] + 1'b1;
      for (int unsigned d = 0; d < NDEC; d++)
        if (dec_en[d] && dec_id[d] == ID_W'(i)) cnt_n[i] = cnt_n[i] - 1'b1;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        tbl[i] <= '0;
        age[i] <= ID_W'(i);
      end
    end else begin
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        tbl[i].pcnt <= cnt_n[i];
        if (kill_mask[i] || (inv_en && tbl[i].base == inv_reg))
          tbl[i].valid <= 1'b0;
        if (alloc_ok && alloc_id == ID_W'(i)) begin
          tbl[i].valid <= 1'b1;
          tbl[i].base  <= alloc_reg;
          tbl[i].off   <= alloc_off;
        end
        if (touch) begin
          if (ID_W'(i) == touch_id)       age[i] <= '0;
          else if (age[i] < age[touch_id]) age[i] <= age[i] + 1'b1;
        end
      end
    end
  end

  always_comb
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      valid_o[i] = tbl[i].valid;
      busy_o[i]  = tbl[i].pcnt != '0;
    end

  // A user is never added to a saturated counter nor removed from an empty one,
  // and the table is never asked to allocate and add a user in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
    inc_en |-> tbl[inc_id].pcnt != CNT_MAX);
  assert property (@(posedge clk) disable iff (!rst_n) !(alloc_ok && inc_en));

endmodule
