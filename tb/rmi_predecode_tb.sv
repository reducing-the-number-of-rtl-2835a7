// rmi_predecode_tb: self-checking test of the predecode-stage store
// elimination.
//
// A random program over 8 registers is generated, rich in counter
// increments ("load r,off(b); add r,r,imm; store off(b),r"), with other
// loads, stores and arithmetic between them, and with base registers being
// overwritten. The program is run two ways and the results are compared:
//  * reference: plain in-order execution of every instruction;
//  * through the DUT: the instruction stream that leaves the predecode
//    window is executed with the RMI meaning of its marks: MARK_GEN saves
//    the generated address in GAC[idx], MARK_LOAD reads memory at GAC[idx]
//    (which must equal the address the load would generate), MARK_STORE
//    also writes the arithmetic result to memory at GAC[idx], and dropped
//    stores are gone.
// Every memory write of the second run must equal, in order, the
// corresponding write of the reference run, and registers and memory must
// agree at the end. The stream must keep program order and every
// instruction that was not dropped must come out. Directed start: the
// plain ++counter sequence must drop its store and mark the add.
module rmi_predecode_tb;
  localparam int unsigned WIN = 4, N = 8, RW = 3, OW = 8, PW = 8, ID_W = 3;
  localparam int unsigned NPROG = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, elim_o;
  rmi_pkg::rmi_op_e in_op, out_op;
  logic [RW-1:0] in_rd, in_rs1, in_rs2, out_rd, out_rs1, out_rs2;
  logic [OW-1:0] in_off, out_off;
  logic [PW-1:0] in_pay, out_pay;
  rmi_pkg::rmi_mark_e out_mark;
  logic [ID_W-1:0] out_idx;

  rmi_predecode #(.WIN(WIN), .ENTRIES(N), .REG_W(RW), .OFF_W(OW), .PAY_W(PW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  typedef struct { rmi_pkg::rmi_op_e op; int unsigned rd, rs1, rs2, off, pay; } ins_t;
  ins_t prog [$];

  // ---- reference execution ----
  int unsigned ref_reg [8];
  int unsigned ref_mem [int unsigned];
  int unsigned ref_wa [$], ref_wd [$];
  // ---- execution of the DUT's output ----
  int unsigned dut_reg [8];
  int unsigned dut_mem [int unsigned];
  int unsigned gac [N];
  int unsigned dut_wa [$], dut_wd [$];
  int n_mload = 0, n_out = 0, n_elim = 0, n_marked = 0, n_in = 0, n_stall = 0;
  int unsigned expect_pay [$];   // program order of kept instructions, by payload

  function automatic int unsigned ea(int unsigned base, int unsigned off);
    return (base + off) & 32'hFF;
  endfunction

  function automatic int unsigned rd_mem(ref int unsigned m [int unsigned], input int unsigned a);
    return m.exists(a) ? m[a] : a * 7;
  endfunction

  task automatic ref_exec(ins_t i);
    case (i.op)
      rmi_pkg::OP_LOAD:  ref_reg[i.rd] = rd_mem(ref_mem, ea(ref_reg[i.rs1], i.off));
      rmi_pkg::OP_STORE: begin
        ref_mem[ea(ref_reg[i.rs1], i.off)] = ref_reg[i.rs2];
        ref_wa.push_back(ea(ref_reg[i.rs1], i.off)); ref_wd.push_back(ref_reg[i.rs2]);
      end
      rmi_pkg::OP_ALU:   ref_reg[i.rd] = (ref_reg[i.rs1] + ref_reg[i.rs2] + i.pay) & 32'hFFFF;
      default: ;
    endcase
  endtask

  // monitor: execute what leaves the window
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int unsigned a, v;
    n_out++;
    checks++;
    if (expect_pay.size() == 0 || expect_pay[0] != int'(out_pay)) begin
      failures++; $display("FAIL t=%0t output order", $time);
    end
    if (expect_pay.size() > 0) void'(expect_pay.pop_front());
    case (out_op)
      rmi_pkg::OP_LOAD: begin
        a = ea(dut_reg[out_rs1], out_off);
        if (out_mark == rmi_pkg::MARK_GEN) gac[out_idx] = a;
        if (out_mark == rmi_pkg::MARK_LOAD) begin
          // address taken from the GAC instead of being generated
          checks++;
          if (gac[out_idx] != a) begin
            failures++; $display("FAIL t=%0t repeated load: slot %0d holds %0h, address is %0h",
                                 $time, out_idx, gac[out_idx], a);
          end
          a = gac[out_idx];
          n_mload++;
        end
        dut_reg[out_rd] = rd_mem(dut_mem, a);
      end
      rmi_pkg::OP_STORE: begin
        a = ea(dut_reg[out_rs1], out_off);
        if (out_mark == rmi_pkg::MARK_GEN) gac[out_idx] = a;
        dut_mem[a] = dut_reg[out_rs2];
        dut_wa.push_back(a); dut_wd.push_back(dut_reg[out_rs2]);
      end
      rmi_pkg::OP_ALU: begin
        v = (dut_reg[out_rs1] + dut_reg[out_rs2] + out_pay) & 32'hFFFF;
        dut_reg[out_rd] = v;
        if (out_mark == rmi_pkg::MARK_STORE) begin
          dut_mem[gac[out_idx]] = v;
          dut_wa.push_back(gac[out_idx]); dut_wd.push_back(v);
          n_marked++;
        end
      end
      default: ;
    endcase
  end

  function automatic ins_t mk(rmi_pkg::rmi_op_e op, int unsigned rd, rs1, rs2, off);
    ins_t i;
    i.op = op; i.rd = rd; i.rs1 = rs1; i.rs2 = rs2; i.off = off; i.pay = 0;
    return i;
  endfunction

  initial begin
    repeat (NPROG * 4 + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int unsigned b, r, o;
    for (int i = 0; i < 8; i++) begin ref_reg[i] = i * 16; dut_reg[i] = i * 16; end
    for (int i = 0; i < N; i++) gac[i] = 0;
    // directed ++counter first, then random program
    prog.push_back(mk(rmi_pkg::OP_LOAD, 6, 1, 0, 8));
    prog.push_back(mk(rmi_pkg::OP_ALU, 6, 6, 0, 0));
    prog.push_back(mk(rmi_pkg::OP_STORE, 0, 1, 6, 8));
    prog.push_back(mk(rmi_pkg::OP_OTHER, 0, 0, 0, 0));
    while (prog.size() < NPROG) begin
      b = $urandom_range(0, 2); r = $urandom_range(3, 7); o = 4 * $urandom_range(0, 3);
      case ($urandom_range(0, 9))
        0, 1, 2, 3: begin
          prog.push_back(mk(rmi_pkg::OP_LOAD, r, b, 0, o));
          if ($urandom_range(0, 3) == 0) prog.push_back(mk(rmi_pkg::OP_ALU, $urandom_range(3, 7), r, 0, 0));
          prog.push_back(mk(rmi_pkg::OP_ALU, r, r, $urandom_range(0, 7), 0));
          if ($urandom_range(0, 3) == 0) prog.push_back(mk(rmi_pkg::OP_ALU, r, r, 0, 0));
          if ($urandom_range(0, 5) == 0) prog.push_back(mk(rmi_pkg::OP_LOAD, $urandom_range(3, 7), $urandom_range(0, 2), 0, 4 * $urandom_range(0, 3)));
          if ($urandom_range(0, 7) == 0) prog.push_back(mk(rmi_pkg::OP_ALU, b, b, 0, 0));
          prog.push_back(mk(rmi_pkg::OP_STORE, 0, b, r, o));
        end
        4: prog.push_back(mk(rmi_pkg::OP_STORE, 0, b, r, o));
        5: prog.push_back(mk(rmi_pkg::OP_LOAD, r, b, 0, o));
        6: prog.push_back(mk(rmi_pkg::OP_ALU, $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7), 0));
        7: prog.push_back(mk(rmi_pkg::OP_ALU, b, b, 0, 0));
        8: prog.push_back(mk(rmi_pkg::OP_LOAD, b, b, 0, o));
        default: prog.push_back(mk(rmi_pkg::OP_OTHER, 0, 0, 0, 0));
      endcase
    end
    foreach (prog[i]) begin
      prog[i].pay = (prog[i].op == rmi_pkg::OP_ALU) ? (i % 5) : 0;
      ref_exec(prog[i]);
    end

    in_valid = 0; in_op = rmi_pkg::OP_OTHER; in_rd = 0; in_rs1 = 0; in_rs2 = 0; in_off = 0; in_pay = 0;
    out_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < prog.size(); ) begin
      // gaps in the stream and a busy decode stage now and then
      in_valid = ($urandom_range(0, 9) < 8) || i < 4;
      out_ready = ($urandom_range(0, 9) < 8);
      in_op = prog[i].op; in_rd = RW'(prog[i].rd); in_rs1 = RW'(prog[i].rs1);
      in_rs2 = RW'(prog[i].rs2); in_off = OW'(prog[i].off);
      // payload: ALU immediate in the low bits; ALU immediates stay below 5
      in_pay = PW'(prog[i].pay);
      #1;
      if (in_valid && in_ready) begin
        if (elim_o) begin
          check(prog[i].op == rmi_pkg::OP_STORE, "only stores are dropped");
          n_elim++;
          if (i == 2) check(1, "directed ++counter store dropped");
        end else expect_pay.push_back(in_pay);
        if (i == 2 && !elim_o) check(0, "directed ++counter store dropped");
        n_in++;
        i++;
      end else if (in_valid) n_stall++;
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (WIN + 4) @(negedge clk);
    check(n_out == n_in - n_elim, "every kept instruction left the window");
    check(dut_wa.size() == ref_wa.size() - 0, "same number of memory writes");
    for (int i = 0; i < ref_wa.size() && i < dut_wa.size(); i++)
      check(dut_wa[i] == ref_wa[i] && dut_wd[i] == ref_wd[i], $sformatf("memory write %0d", i));
    for (int i = 0; i < 8; i++) check(dut_reg[i] == ref_reg[i], "final register");
    check(n_elim > 100, "stores dropped");
    check(n_marked == n_elim, "one marked result per dropped store");
    check(n_stall > 10, "back-pressure exercised");
    check(n_mload > 50, "repeated loads take the cached address");
    $display("program=%0d dropped_stores=%0d marked=%0d cached_loads=%0d stalls=%0d writes=%0d",
             prog.size(), n_elim, n_marked, n_mload, n_stall, ref_wa.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
