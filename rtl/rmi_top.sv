// rmi_top: the three Reduction of Memory Instructions (RMI) realisations,
// side by side.
//
// RMI avoids generating a memory address twice. When a load or store uses
// the same base register and offset as an earlier memory instruction, the
// address already generated is taken from a Generated Address Cache instead
// of being computed again. Three realisations are provided, each for a
// different kind of processor, and each keeps its own ports (prefixes a_,
// b_, i_ and p_); they share nothing but the clock and reset:
//  * a_: Case A for out-of-order superscalar cores (rmi_case_a). A matching
//    load or store is not issued at all; Load/Store Forward Control queues
//    hand it to the load or store buffer once address and data are ready.
//  * b_: Case B for out-of-order superscalar cores (rmi_case_b). A store
//    matching an earlier load goes into a Special Store Reservation Station
//    and skips address generation and execution.
//  * i_: RISC, VLIW and in-order superscalar cores (rmi_inorder). The
//    compiler removes the store and marks the producing arithmetic
//    instruction; the hardware forwards marked results to the write buffer
//    with the cached address.
//  * p_: the hardware alternative to that compiler step for the same cores
//    (rmi_predecode), in the prefetch/predecode stage. Its output stream
//    carries the marks that rmi_inorder acts on after the execute stage;
//    the pipeline stages in between belong to the core, so the two are
//    connected outside this module.
// The processor around them (renaming, reservation stations, execution
// units, reorder buffer, load and store buffers) is outside this design; the
// ports are where it connects. Timing is that of the units: decode
// decisions are combinational, tables update at the clock edge.
//
// All sizes are this design's defaults (see rmi_pkg).
module rmi_top #(
  parameter int unsigned ENTRIES = rmi_pkg::DLT_ENTRIES,
  parameter int unsigned DEPTH   = rmi_pkg::FWD_DEPTH,
  parameter int unsigned REG_W   = rmi_pkg::PREG_W,
  parameter int unsigned LREG_W  = 5,
  parameter int unsigned OFF_W   = rmi_pkg::OFF_W,
  parameter int unsigned ADDR_W  = rmi_pkg::ADDR_W,
  parameter int unsigned DATA_W  = rmi_pkg::DATA_W,
  parameter int unsigned ROB_W   = rmi_pkg::ROB_W,
  parameter int unsigned CNT_W   = rmi_pkg::PCNT_W,
  parameter int unsigned WIN     = 4,
  parameter int unsigned PAY_W   = 16,
  localparam int unsigned ID_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---------------- Case A ----------------
  input  logic              a_dec_valid,
  input  logic              a_dec_is_store,
  input  logic [REG_W-1:0]  a_dec_base,
  input  logic [OFF_W-1:0]  a_dec_off,
  input  logic [REG_W-1:0]  a_dec_reg,
  input  logic              a_dec_data_rdy,
  input  logic [DATA_W-1:0] a_dec_data,
  output logic              a_dec_elim,
  output logic              a_dec_issue,
  output logic              a_iss_tag_valid,
  output logic [ID_W-1:0]   a_iss_tag_id,
  input  logic              a_agu_valid,
  input  logic [ID_W-1:0]   a_agu_id,
  input  logic [ADDR_W-1:0] a_agu_addr,
  input  logic              a_cdb_valid,
  input  logic [REG_W-1:0]  a_cdb_tag,
  input  logic [DATA_W-1:0] a_cdb_data,
  input  logic              a_inv_en,
  input  logic [REG_W-1:0]  a_inv_reg,
  output logic              a_lb_valid,
  input  logic              a_lb_ready,
  output logic [ADDR_W-1:0] a_lb_addr,
  output logic [REG_W-1:0]  a_lb_reg,
  output logic              a_sb_valid,
  input  logic              a_sb_ready,
  output logic [ADDR_W-1:0] a_sb_addr,
  output logic [DATA_W-1:0] a_sb_data,
  // ---------------- Case B ----------------
  input  logic              b_dec_valid,
  input  logic              b_dec_is_store,
  input  logic [REG_W-1:0]  b_dec_base,
  input  logic [OFF_W-1:0]  b_dec_off,
  input  logic [REG_W-1:0]  b_dec_reg,
  input  logic              b_dec_data_rdy,
  input  logic [DATA_W-1:0] b_dec_data,
  input  logic [ROB_W-1:0]  b_dec_rob,
  output logic              b_dec_to_ssrs,
  output logic              b_dec_issue,
  output logic              b_iss_tag_valid,
  output logic [ID_W-1:0]   b_iss_tag_id,
  input  logic              b_agu_valid,
  input  logic [ID_W-1:0]   b_agu_id,
  input  logic [ADDR_W-1:0] b_agu_addr,
  input  logic              b_cdb_valid,
  input  logic [REG_W-1:0]  b_cdb_tag,
  input  logic [DATA_W-1:0] b_cdb_data,
  input  logic              b_inv_en,
  input  logic [REG_W-1:0]  b_inv_reg,
  output logic              b_sb_valid,
  input  logic              b_sb_ready,
  output logic [ADDR_W-1:0] b_sb_addr,
  output logic [DATA_W-1:0] b_sb_data,
  output logic [ROB_W-1:0]  b_sb_rob,
  // ---------------- in-order / RISC / VLIW ----------------
  input  logic              i_ex_valid,
  input  logic [1:0]        i_ex_mark,     // rmi_pkg::rmi_mark_e encoding
  input  logic [ID_W-1:0]   i_ex_idx,
  input  logic [ADDR_W-1:0] i_ex_addr,
  input  logic [DATA_W-1:0] i_ex_result,
  input  logic [LREG_W-1:0] i_ex_rd,
  output logic              i_ex_ready,
  output logic              i_miss,
  output logic              i_wb_valid,
  input  logic              i_wb_ready,
  output logic [ADDR_W-1:0] i_wb_addr,
  output logic [DATA_W-1:0] i_wb_data,
  output logic              i_lb_valid,
  input  logic              i_lb_ready,
  output logic [ADDR_W-1:0] i_lb_addr,
  output logic [LREG_W-1:0] i_lb_reg,
  // ---------------- predecode (RISC / VLIW / in-order) ----------------
  input  logic              p_in_valid,
  output logic              p_in_ready,
  input  logic [1:0]        p_in_op,       // rmi_pkg::rmi_op_e encoding
  input  logic [LREG_W-1:0] p_in_rd,
  input  logic [LREG_W-1:0] p_in_rs1,
  input  logic [LREG_W-1:0] p_in_rs2,
  input  logic [OFF_W-1:0]  p_in_off,
  input  logic [PAY_W-1:0]  p_in_pay,
  output logic              p_out_valid,
  input  logic              p_out_ready,
  output logic [1:0]        p_out_op,
  output logic [LREG_W-1:0] p_out_rd,
  output logic [LREG_W-1:0] p_out_rs1,
  output logic [LREG_W-1:0] p_out_rs2,
  output logic [OFF_W-1:0]  p_out_off,
  output logic [PAY_W-1:0]  p_out_pay,
  output logic [1:0]        p_out_mark,    // rmi_pkg::rmi_mark_e encoding
  output logic [ID_W-1:0]   p_out_idx,
  output logic              p_elim
);

  rmi_case_a #(
    .ENTRIES(ENTRIES), .DEPTH(DEPTH), .REG_W(REG_W), .OFF_W(OFF_W),
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .CNT_W(CNT_W)
  ) u_case_a (
    .clk, .rst_n,
    .dec_valid(a_dec_valid), .dec_is_store(a_dec_is_store), .dec_base(a_dec_base),
    .dec_off(a_dec_off), .dec_reg(a_dec_reg), .dec_data_rdy(a_dec_data_rdy),
    .dec_data(a_dec_data), .dec_elim(a_dec_elim), .dec_issue(a_dec_issue),
    .iss_tag_valid(a_iss_tag_valid), .iss_tag_id(a_iss_tag_id),
    .agu_valid(a_agu_valid), .agu_id(a_agu_id), .agu_addr(a_agu_addr),
    .cdb_valid(a_cdb_valid), .cdb_tag(a_cdb_tag), .cdb_data(a_cdb_data),
    .inv_en(a_inv_en), .inv_reg(a_inv_reg),
    .lb_valid(a_lb_valid), .lb_ready(a_lb_ready), .lb_addr(a_lb_addr), .lb_reg(a_lb_reg),
    .sb_valid(a_sb_valid), .sb_ready(a_sb_ready), .sb_addr(a_sb_addr), .sb_data(a_sb_data)
  );

  rmi_case_b #(
    .ENTRIES(ENTRIES), .REG_W(REG_W), .OFF_W(OFF_W), .ADDR_W(ADDR_W),
    .DATA_W(DATA_W), .ROB_W(ROB_W)
  ) u_case_b (
    .clk, .rst_n,
    .dec_valid(b_dec_valid), .dec_is_store(b_dec_is_store), .dec_base(b_dec_base),
    .dec_off(b_dec_off), .dec_reg(b_dec_reg), .dec_data_rdy(b_dec_data_rdy),
    .dec_data(b_dec_data), .dec_rob(b_dec_rob), .dec_to_ssrs(b_dec_to_ssrs),
    .dec_issue(b_dec_issue), .iss_tag_valid(b_iss_tag_valid), .iss_tag_id(b_iss_tag_id),
    .agu_valid(b_agu_valid), .agu_id(b_agu_id), .agu_addr(b_agu_addr),
    .cdb_valid(b_cdb_valid), .cdb_tag(b_cdb_tag), .cdb_data(b_cdb_data),
    .inv_en(b_inv_en), .inv_reg(b_inv_reg),
    .sb_valid(b_sb_valid), .sb_ready(b_sb_ready), .sb_addr(b_sb_addr),
    .sb_data(b_sb_data), .sb_rob(b_sb_rob)
  );

  rmi_inorder #(
    .ENTRIES(ENTRIES), .REG_W(LREG_W), .ADDR_W(ADDR_W), .DATA_W(DATA_W)
  ) u_inorder (
    .clk, .rst_n,
    .ex_valid(i_ex_valid), .ex_mark(rmi_pkg::rmi_mark_e'(i_ex_mark)), .ex_idx(i_ex_idx),
    .ex_addr(i_ex_addr), .ex_result(i_ex_result), .ex_rd(i_ex_rd),
    .ex_ready(i_ex_ready), .miss_o(i_miss),
    .wb_valid(i_wb_valid), .wb_ready(i_wb_ready), .wb_addr(i_wb_addr), .wb_data(i_wb_data),
    .lb_valid(i_lb_valid), .lb_ready(i_lb_ready), .lb_addr(i_lb_addr), .lb_reg(i_lb_reg)
  );

  rmi_pkg::rmi_op_e   p_out_op_e;
  rmi_pkg::rmi_mark_e p_out_mark_e;
  assign p_out_op   = p_out_op_e;
  assign p_out_mark = p_out_mark_e;

  rmi_predecode #(
    .WIN(WIN), .ENTRIES(ENTRIES), .REG_W(LREG_W), .OFF_W(OFF_W), .PAY_W(PAY_W)
  ) u_predecode (
    .clk, .rst_n,
    .in_valid(p_in_valid), .in_ready(p_in_ready), .in_op(rmi_pkg::rmi_op_e'(p_in_op)),
    .in_rd(p_in_rd), .in_rs1(p_in_rs1), .in_rs2(p_in_rs2), .in_off(p_in_off), .in_pay(p_in_pay),
    .out_valid(p_out_valid), .out_ready(p_out_ready), .out_op(p_out_op_e),
    .out_rd(p_out_rd), .out_rs1(p_out_rs1), .out_rs2(p_out_rs2), .out_off(p_out_off),
    .out_pay(p_out_pay), .out_mark(p_out_mark_e), .out_idx(p_out_idx), .elim_o(p_elim)
  );

endmodule
