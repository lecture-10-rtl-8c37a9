// sc_ctrl_tb: feeds every instruction (random register and immediate
// fields, eq both 0 and 1) to the single-cycle control unit and compares
// every control signal with the expected row of the control table,
// including lw.ai's second register write.
module sc_ctrl_tb;
  import parc_pkg::*;
  import parc_tb_pkg::*;
  logic [31:0] ir;
  logic        eq;
  sc_ctrl_t    cs, exp;
  int checks = 0, failures = 0;

  sc_ctrl dut (.ir, .eq, .cs);

  // row: pc_sel op1_sel alu_func wb_sel rf_waddr rf_wen dmem_val dmem_type
  function automatic sc_ctrl_t row(sc_pc_sel_e p, sc_op1_sel_e o, sc_alu_func_e a,
                                   sc_wb_sel_e w, sc_waddr_sel_e r, bit wen, bit dv, mem_type_e dt);
    return '{pc_sel: p, op1_sel: o, alu_func: a, wb_sel: w, rf_waddr: r, rf_wen: wen, rf_wen_rs: 1'b0,
             imemreq_val: 1'b1, dmemreq_val: dv, dmemreq_type: dt};
  endfunction

  initial begin
    for (int n = 0; n < 400; n++) begin
      int k, a, b, c;
      a = $urandom % 32; b = $urandom % 32; c = $urandom % 32;
      k = n % 11;
      eq = 1'($urandom);
      case (k)
        0: begin ir = e_addu(c, a, b);  exp = row(PC_PLUS4, OP1_RF,   SC_ALU_ADD, WB_ALU, WA_RD,  1, 0, MEM_READ); end
        1: begin ir = e_addiu(b, a, $urandom); exp = row(PC_PLUS4, OP1_SEXT, SC_ALU_ADD, WB_ALU, WA_RT,  1, 0, MEM_READ); end
        2: begin ir = e_mul(c, a, b);   exp = row(PC_PLUS4, OP1_RF,   SC_ALU_ADD, WB_MUL, WA_RD,  1, 0, MEM_READ); end
        3: begin ir = e_lw(b, $urandom, a); exp = row(PC_PLUS4, OP1_SEXT, SC_ALU_ADD, WB_MEM, WA_RT,  1, 1, MEM_READ); end
        4: begin ir = e_sw(b, $urandom, a); exp = row(PC_PLUS4, OP1_SEXT, SC_ALU_ADD, WB_ALU, WA_RD,  0, 1, MEM_WRITE); end
        5: begin ir = e_j($urandom);   exp = row(PC_J,  OP1_RF,  SC_ALU_ADD, WB_ALU, WA_RD,  0, 0, MEM_READ); end
        6: begin ir = e_jal($urandom); exp = row(PC_J,  OP1_PC4, SC_ALU_CP1, WB_ALU, WA_R31, 1, 0, MEM_READ); end
        7: begin ir = e_jr(a);         exp = row(PC_JR, OP1_RF,  SC_ALU_ADD, WB_ALU, WA_RD,  0, 0, MEM_READ); end
        8: begin ir = e_bne(a, b, $urandom);
                 exp = row(eq ? PC_PLUS4 : PC_BR, OP1_RF, SC_ALU_CMP, WB_ALU, WA_RD, 0, 0, MEM_READ); end
        9: begin ir = e_lwai(b, $urandom, a); exp = row(PC_PLUS4, OP1_SEXT, SC_ALU_ADD, WB_MEM, WA_RT, 1, 1, MEM_READ);
                 exp.rf_wen_rs = 1'b1; end
        default: begin ir = {6'h3F, 26'($urandom)};
                 exp = row(PC_PLUS4, OP1_RF, SC_ALU_ADD, WB_ALU, WA_RD, 0, 0, MEM_READ); end
      endcase
      #1;
      // don't-care fields: compare only what matters for each instruction
      checks++;
      if (cs.pc_sel != exp.pc_sel || cs.rf_wen != exp.rf_wen || cs.rf_wen_rs != exp.rf_wen_rs || cs.imemreq_val != 1'b1 ||
          cs.dmemreq_val != exp.dmemreq_val ||
          (exp.dmemreq_val && cs.dmemreq_type != exp.dmemreq_type) ||
          (exp.rf_wen && (cs.wb_sel != exp.wb_sel || cs.rf_waddr != exp.rf_waddr)) ||
          ((exp.rf_wen && exp.wb_sel == WB_ALU) || exp.dmemreq_val || k == 8) &&
            (cs.op1_sel != exp.op1_sel || cs.alu_func != exp.alu_func)) begin
        failures++;
        $display("FAIL case %0d ir=%h eq=%b cs=%p exp=%p", k, ir, eq, cs, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
