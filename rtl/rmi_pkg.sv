// rmi_pkg: default sizes shared by the Reduction of Memory Instructions (RMI)
// units.
//
// RMI removes the address-generation work of a load or store whose address
// (same base register, same offset) was already computed by an earlier memory
// instruction. The units that implement it (Dependence Lookup Table, Generated
// Address Cache, Load/Store Forward Control queues, Special Store Reservation
// Station) all take their sizes as module parameters; the defaults below are
// this design's own choice, since the method fixes no table size or word
// width. A 32-bit address/data machine with 64 renamed physical registers,
// a 32-entry reorder buffer and a 16-bit immediate offset is assumed.
package rmi_pkg;

  // Address and data word width.
  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned DATA_W      = 32;
  // Immediate offset field of a load/store.
  localparam int unsigned OFF_W       = 16;
  // Physical (renamed) register number width: 64 registers.
  localparam int unsigned PREG_W      = 6;
  // Reorder buffer index width: 32 entries.
  localparam int unsigned ROB_W       = 5;
  // Entries in the Dependence Lookup Table and the tables indexed by it.
  localparam int unsigned DLT_ENTRIES = 8;
  // Depth of the Load and Store Forward Control queues.
  localparam int unsigned FWD_DEPTH   = 4;
  // Width of the Case A Process Counter (Case B uses a single Process Bit).
  localparam int unsigned PCNT_W      = 3;

  // Compile-time RMI marks carried by an instruction into the execute stage of
  // a RISC, VLIW or in-order superscalar pipeline.
  typedef enum logic [1:0] {
    MARK_NONE  = 2'd0, // ordinary instruction
    MARK_GEN   = 2'd1, // load/store whose generated address is kept in GAC[idx]
    MARK_STORE = 2'd2, // arithmetic result also goes to memory at GAC[idx]
    MARK_LOAD  = 2'd3  // load at GAC[idx] without address generation
  } rmi_mark_e;

  // Instruction classes seen by the predecode-stage RMI logic.
  typedef enum logic [1:0] {
    OP_OTHER = 2'd0, // writes no register (branch, nop, ...)
    OP_LOAD  = 2'd1, // rd <- mem[rs1 + off]
    OP_STORE = 2'd2, // mem[rs1 + off] <- rs2
    OP_ALU   = 2'd3  // rd <- f(rs1, rs2 or immediate)
  } rmi_op_e;

endpackage
