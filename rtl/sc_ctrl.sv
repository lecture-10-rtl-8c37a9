// sc_ctrl: control unit of the single-cycle processor.
//
// A purely combinational decoder: from the fetched instruction and the eq
// status it produces every control signal of the datapath for the same
// cycle. Per instruction (pc_sel / op1_sel / alu_func / wb_sel / rf_waddr /
// rf_wen / dmem request):
//   addu   pc+4    rf    +     alu  rd   1  -
//   addiu  pc+4    sext  +     alu  rt   1  -
//   mul    pc+4    rf    -     mul  rd   1  -
//   lw     pc+4    sext  +     mem  rt   1  read
//   sw     pc+4    sext  +     -    -    0  write
//   j      j_targ  -     -     -    -    0  -
//   jal    j_targ  pc+4  copy  alu  r31  1  -
//   jr     jr      -     -     -    -    0  -
//   bne    br_targ if not eq, else pc+4; rf, compare, no write
//   lw.ai  as lw, and also R[rs] <- R[rs] + 4 through the second write port
// The addu, mul, lw, j and jr rows follow the lecture's control table; the
// other rows (and the second write enable rf_wen_rs) are completed by this
// design. The instruction request is valid
// every cycle. Unknown instructions behave as no-ops.
module sc_ctrl
  import parc_pkg::*;
(
  input  logic [XLEN-1:0] ir,
  input  logic            eq,
  output sc_ctrl_t        cs
);

  inst_e inst;
  assign inst = decode_inst(ir);

  always_comb begin
    cs = '{pc_sel: PC_PLUS4, op1_sel: OP1_RF, alu_func: SC_ALU_ADD,
           wb_sel: WB_ALU, rf_waddr: WA_RD, rf_wen: 1'b0,
           rf_wen_rs: 1'b0, imemreq_val: 1'b1, dmemreq_val: 1'b0, dmemreq_type: MEM_READ};
    unique case (inst)
      I_ADDU:  begin cs.rf_wen = 1'b1; end
      I_ADDIU: begin cs.op1_sel = OP1_SEXT; cs.rf_waddr = WA_RT; cs.rf_wen = 1'b1; end
      I_MUL:   begin cs.wb_sel = WB_MUL; cs.rf_wen = 1'b1; end
      I_LW:    begin
        cs.op1_sel = OP1_SEXT; cs.wb_sel = WB_MEM; cs.rf_waddr = WA_RT;
        cs.rf_wen = 1'b1; cs.dmemreq_val = 1'b1;
      end
      I_LWAI:  begin
        cs.op1_sel = OP1_SEXT; cs.wb_sel = WB_MEM; cs.rf_waddr = WA_RT;
        cs.rf_wen = 1'b1; cs.rf_wen_rs = 1'b1; cs.dmemreq_val = 1'b1;
      end
      I_SW:    begin
        cs.op1_sel = OP1_SEXT; cs.dmemreq_val = 1'b1; cs.dmemreq_type = MEM_WRITE;
      end
      I_J:     begin cs.pc_sel = PC_J; end
      I_JAL:   begin
        cs.pc_sel = PC_J; cs.op1_sel = OP1_PC4; cs.alu_func = SC_ALU_CP1;
        cs.rf_waddr = WA_R31; cs.rf_wen = 1'b1;
      end
      I_JR:    begin cs.pc_sel = PC_JR; end
      I_BNE:   begin
        cs.alu_func = SC_ALU_CMP;
        cs.pc_sel   = eq ? PC_PLUS4 : PC_BR;
      end
      default: ;
    endcase
  end

endmodule
