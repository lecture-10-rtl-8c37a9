// fsm_ctrl_tb: steps the FSM control unit through the whole sequence of
// each instruction, from F0 back to F0, and compares the visited states
// with the expected micro-operation sequence (which also checks the cycle
// count of every instruction, bne both taken and not taken). In each state
// it checks the bus driver, the register loaded, the register-file address
// and write enable, and the memory request, against a table of the
// micro-operations.
module fsm_ctrl_tb;
  import parc_pkg::*;
  import parc_tb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [31:0] ir;
  logic        eq;
  fsm_ctrl_t   cs;
  fsm_state_e  state;
  int checks = 0, failures = 0;

  fsm_ctrl dut (.clk, .rst, .ir, .eq, .cs, .state);

  // Expected micro-operation summary of a state:
  // bus source, destinations, rf address, rf write, mem valid, mem write, alu func
  typedef enum int { SRC_NONE, SRC_PC, SRC_IAU, SRC_ALU, SRC_RF, SRC_RD } src_e;

  function automatic src_e bus_src(fsm_ctrl_t c);
    if (c.pc_bus_en)  return SRC_PC;
    if (c.iau_bus_en) return SRC_IAU;
    if (c.alu_bus_en) return SRC_ALU;
    if (c.rf_bus_en)  return SRC_RF;
    if (c.rd_bus_en)  return SRC_RD;
    return SRC_NONE;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %s)", what, state.name()); end
  endtask

  // Check the control signals of the current state
  task automatic check_state();
    fsm_ctrl_t c;
    int nbus;
    c = cs;
    nbus = int'(c.pc_bus_en) + int'(c.iau_bus_en) + int'(c.alu_bus_en) + int'(c.rf_bus_en) + int'(c.rd_bus_en);
    check(nbus == 1, "exactly one bus driver");
    case (state)
      F0:  check(bus_src(c) == SRC_PC && c.a_en && c.memreq_val && c.memreq_type == MEM_READ, "F0");
      F1:  check(bus_src(c) == SRC_RD && c.ir_en, "F1 IR <- RD");
      F2:  check(bus_src(c) == SRC_ALU && c.alu_func == FA_PLUS4 && c.pc_en, "F2 PC <- A + 4");
      A0, AI0, L0, S1, B0, LA0:
           check(bus_src(c) == SRC_RF && c.rf_addr_sel == RA_RS && c.a_en && !c.rf_wen, "A <- RF[rs]");
      A1, B1: check(bus_src(c) == SRC_RF && c.rf_addr_sel == RA_RT && c.b_en && !c.b_sel, "B <- RF[rt]");
      AI1, L1, S2, LA1: check(bus_src(c) == SRC_IAU && c.iau_func == IAU_SI && c.b_en && !c.b_sel, "B <- sext");
      A2:  check(bus_src(c) == SRC_ALU && c.alu_func == FA_ADD && c.rf_wen && c.rf_addr_sel == RA_RD, "RF[rd] <- A+B");
      AI2: check(bus_src(c) == SRC_ALU && c.alu_func == FA_ADD && c.rf_wen && c.rf_addr_sel == RA_RT, "RF[rt] <- A+B");
      M0:  check(bus_src(c) == SRC_RF && c.rf_addr_sel == RA_0 && c.a_en, "A <- RF[r0]");
      M1:  check(bus_src(c) == SRC_RF && c.rf_addr_sel == RA_RS && c.b_en && !c.b_sel, "B <- RF[rs]");
      M2:  check(bus_src(c) == SRC_RF && c.rf_addr_sel == RA_RT && c.c_en && !c.c_sel, "C <- RF[rt]");
      MITER: check(bus_src(c) == SRC_ALU && c.alu_func == FA_ADDC && c.a_en && c.b_en && c.b_sel &&
                   c.c_en && c.c_sel && !c.rf_wen, "multiply step");
      M35: check(bus_src(c) == SRC_ALU && c.alu_func == FA_ADDC && c.rf_wen && c.rf_addr_sel == RA_RD, "M35");
      L2, LA2: check(bus_src(c) == SRC_ALU && c.alu_func == FA_ADD && c.memreq_val && c.memreq_type == MEM_READ, "load address");
      L3, LA3: check(bus_src(c) == SRC_RD && c.rf_wen && c.rf_addr_sel == RA_RT, "RF[rt] <- RD");
      LA4: check(bus_src(c) == SRC_ALU && c.alu_func == FA_PLUS4 && c.rf_wen && c.rf_addr_sel == RA_RS, "RF[rs] <- A+4");
      S0:  check(bus_src(c) == SRC_RF && c.rf_addr_sel == RA_RT && c.wd_en, "WD <- RF[rt]");
      S3:  check(bus_src(c) == SRC_ALU && c.alu_func == FA_ADD && c.memreq_val && c.memreq_type == MEM_WRITE, "store");
      J0, JA1: check(bus_src(c) == SRC_IAU && c.iau_func == IAU_TS && c.b_en && !c.b_sel, "B <- targ<<2");
      J1, JA2: check(bus_src(c) == SRC_ALU && c.alu_func == FA_JT && c.pc_en, "PC <- A jt B");
      JA0: check(bus_src(c) == SRC_PC && c.rf_wen && c.rf_addr_sel == RA_31, "RF[31] <- PC");
      JR0: check(bus_src(c) == SRC_RF && c.rf_addr_sel == RA_RS && c.pc_en, "PC <- RF[rs]");
      B2:  check(bus_src(c) == SRC_IAU && c.iau_func == IAU_SIS && c.a_en, "A <- sext<<2");
      B3:  check(bus_src(c) == SRC_PC && c.b_en && !c.b_sel, "B <- PC");
      B4:  check(bus_src(c) == SRC_ALU && c.alu_func == FA_ADD && c.pc_en, "PC <- A+B");
      MM0: check(bus_src(c) == SRC_RF && c.rf_addr_sel == RA_RS && c.memreq_val && c.memreq_type == MEM_READ, "MM0");
      MM1: check(bus_src(c) == SRC_RD && c.a_en, "MM1");
      MM2: check(bus_src(c) == SRC_RF && c.rf_addr_sel == RA_RT && c.memreq_val && c.memreq_type == MEM_READ, "MM2");
      MM3: check(bus_src(c) == SRC_RD && c.b_en && !c.b_sel, "MM3");
      MM4: check(bus_src(c) == SRC_ALU && c.alu_func == FA_ADD && c.wd_en, "MM4");
      MM5: check(bus_src(c) == SRC_RF && c.rf_addr_sel == RA_RD && c.memreq_val && c.memreq_type == MEM_WRITE, "MM5");
      default: check(1'b0, "unexpected state");
    endcase
    // a state that writes nothing to memory or registers must not enable them
    if (!(state inside {F0, L2, LA2, S3, MM0, MM2, MM5})) check(!c.memreq_val, "no memory request");
  endtask

  task automatic run_inst(bit [31:0] w, bit eqv, fsm_state_e seq[$], string name);
    int i;
    ir = w; eq = eqv;
    // fetch states are F0, F1, F2 whatever IR holds
    seq = {F0, F1, F2, seq};
    i = 0;
    foreach (seq[k]) begin
      check(state == seq[k], $sformatf("%s step %0d: got %s expected %s", name, k, state.name(), seq[k].name()));
      check_state();
      @(posedge clk); #1;
      i++;
    end
    check(state == F0, $sformatf("%s: back to F0 after %0d cycles", name, i));
  endtask

  initial begin
    fsm_state_e mul_seq[$];
    ir = '0; eq = 1'b0;
    @(posedge clk); @(posedge clk); #1 rst = 1'b0;
    mul_seq = {M0, M1, M2};
    repeat (32) mul_seq.push_back(MITER);
    mul_seq.push_back(M35);
    for (int r = 0; r < 3; r++) begin
      run_inst(e_addu(3, 1, 2), 1'($urandom), '{A0, A1, A2}, "addu");
      run_inst(e_addiu(3, 1, 7), 1'($urandom), '{AI0, AI1, AI2}, "addiu");
      run_inst(e_mul(3, 1, 2), 1'($urandom), mul_seq, "mul");
      run_inst(e_lw(3, 8, 1), 1'($urandom), '{L0, L1, L2, L3}, "lw");
      run_inst(e_sw(3, 8, 1), 1'($urandom), '{S0, S1, S2, S3}, "sw");
      run_inst(e_j(64), 1'($urandom), '{J0, J1}, "j");
      run_inst(e_jal(64), 1'($urandom), '{JA0, JA1, JA2}, "jal");
      run_inst(e_jr(31), 1'($urandom), '{JR0}, "jr");
      run_inst(e_bne(1, 2, 3), 1'b1, '{B0, B1, B2}, "bne not taken");
      run_inst(e_bne(1, 2, 3), 1'b0, '{B0, B1, B2, B3, B4}, "bne taken");
      run_inst(e_lwai(3, 4, 1), 1'($urandom), '{LA0, LA1, LA2, LA3, LA4}, "lw.ai");
      run_inst(e_addumm(3, 1, 2), 1'($urandom), '{MM0, MM1, MM2, MM3, MM4, MM5}, "addu.mm");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
