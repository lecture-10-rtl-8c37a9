// fsm_ctrl: control unit of the FSM processor.
//
// A finite-state machine in which each state performs one micro-operation
// of register transfers over the datapath bus; the state register and the
// multiply step counter are its only storage. All control signals are a
// combinational function of the current state (plus eq in B2). Sequences
// (register <- source; "goto F0" returns to fetch):
//   fetch : F0 memreq.addr <- PC, A <- PC (RD captures the word)
//           F1 IR <- RD;  F2 PC <- A + 4, then dispatch on IR
//   addu  : A0 A <- RF[rs];  A1 B <- RF[rt];  A2 RF[rd] <- A + B
//   addiu : AI0 A <- RF[rs]; AI1 B <- sext(imm); AI2 RF[rt] <- A + B
//   mul   : M0 A <- RF[r0]; M1 B <- RF[rs]; M2 C <- RF[rt];
//           M3..M34 A <- A +? B, B <- B << 1, C <- C >> 1 (32 times);
//           M35 RF[rd] <- A +? B
//   lw    : L0 A <- RF[rs]; L1 B <- sext(off); L2 memreq.addr <- A + B;
//           L3 RF[rt] <- RD
//   sw    : S0 WD <- RF[rt]; S1 A <- RF[rs]; S2 B <- sext(imm);
//           S3 memreq.addr <- A + B (write)
//   j     : J0 B <- targ << 2;  J1 PC <- A jt B
//   jal   : JA0 RF[31] <- PC; JA1 B <- targ << 2; JA2 PC <- A jt B
//   jr    : JR0 PC <- RF[rs]
//   bne   : B0 A <- RF[rs]; B1 B <- RF[rt];
//           B2 A <- sext(off) << 2, back to fetch if A == B;
//           B3 B <- PC;  B4 PC <- A + B
//   lw.ai : LA0-LA3 as lw;  LA4 RF[rs] <- A + 4 (A still holds R[rs])
//   addu.mm: MM0 memreq.addr <- RF[rs]; MM1 A <- RD;
//           MM2 memreq.addr <- RF[rt]; MM3 B <- RD; MM4 WD <- A + B;
//           MM5 memreq.addr <- RF[rd] (write)
// The mul, j, jal, lw, sw, jr and bne sequences are the lecture's. The
// fetch, addu and addiu sequences, the two extension sequences, and the
// use of a counter for M3..M34 are this design's. Cycles per instruction:
// 3 for fetch plus addu/addiu 3, mul 36, lw 4, sw 4, j 2, jal 3, jr 1,
// bne 3 (not taken) or 5 (taken), lw.ai 5, addu.mm 6. An unrecognised
// instruction goes straight back to F0. Reset (synchronous) enters F0.
module fsm_ctrl
  import parc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [XLEN-1:0] ir,
  input  logic            eq,
  output fsm_ctrl_t       cs,
  output fsm_state_e      state
);

  fsm_state_e state_next;
  logic [$clog2(MUL_STEPS)-1:0] step;
  inst_e      inst;

  assign inst = decode_inst(ir);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= F0;
      step  <= '0;
    end else begin
      state <= state_next;
      step  <= (state == MITER) ? step + 1'b1 : '0;
    end
  end

  // Next state
  always_comb begin
    state_next = F0;
    unique case (state)
      F0: state_next = F1;
      F1: state_next = F2;
      F2: begin
        unique case (inst)
          I_ADDU:   state_next = A0;
          I_ADDIU:  state_next = AI0;
          I_MUL:    state_next = M0;
          I_LW:     state_next = L0;
          I_SW:     state_next = S0;
          I_J:      state_next = J0;
          I_JAL:    state_next = JA0;
          I_JR:     state_next = JR0;
          I_BNE:    state_next = B0;
          I_LWAI:   state_next = LA0;
          I_ADDUMM: state_next = MM0;
          default:  state_next = F0;
        endcase
      end
      A0: state_next = A1;     A1: state_next = A2;
      AI0: state_next = AI1;   AI1: state_next = AI2;
      M0: state_next = M1;     M1: state_next = M2;   M2: state_next = MITER;
      MITER: state_next = (step == ($clog2(MUL_STEPS))'(MUL_STEPS - 1)) ? M35 : MITER;
      L0: state_next = L1;     L1: state_next = L2;   L2: state_next = L3;
      S0: state_next = S1;     S1: state_next = S2;   S2: state_next = S3;
      J0: state_next = J1;
      JA0: state_next = JA1;   JA1: state_next = JA2;
      B0: state_next = B1;     B1: state_next = B2;
      B2: state_next = eq ? F0 : B3;
      B3: state_next = B4;
      LA0: state_next = LA1;   LA1: state_next = LA2;
      LA2: state_next = LA3;   LA3: state_next = LA4;
      MM0: state_next = MM1;   MM1: state_next = MM2;   MM2: state_next = MM3;
      MM3: state_next = MM4;   MM4: state_next = MM5;
      default: state_next = F0;   // A2, AI2, M35, L3, S3, J1, JA2, JR0, B4, LA4, MM5
    endcase
  end

  // Control signals of the current state
  always_comb begin
    cs = '0;
    cs.rf_addr_sel = RA_0;
    cs.iau_func    = IAU_SI;
    cs.alu_func    = FA_ADD;
    cs.memreq_type = MEM_READ;
    unique case (state)
      // fetch
      F0:  begin cs.pc_bus_en = 1'b1; cs.a_en = 1'b1; cs.memreq_val = 1'b1; end
      F1:  begin cs.rd_bus_en = 1'b1; cs.ir_en = 1'b1; end
      F2:  begin cs.alu_func = FA_PLUS4; cs.alu_bus_en = 1'b1; cs.pc_en = 1'b1; end
      // A <- RF[rs]
      A0, AI0, L0, S1, B0, LA0: begin
        cs.rf_addr_sel = RA_RS; cs.rf_bus_en = 1'b1; cs.a_en = 1'b1;
      end
      // B <- RF[rt]
      A1, B1: begin cs.rf_addr_sel = RA_RT; cs.rf_bus_en = 1'b1; cs.b_en = 1'b1; end
      // B <- sext(imm)
      AI1, L1, S2, LA1: begin cs.iau_func = IAU_SI; cs.iau_bus_en = 1'b1; cs.b_en = 1'b1; end
      A2:  begin cs.alu_bus_en = 1'b1; cs.rf_addr_sel = RA_RD; cs.rf_wen = 1'b1; end
      AI2: begin cs.alu_bus_en = 1'b1; cs.rf_addr_sel = RA_RT; cs.rf_wen = 1'b1; end
      // mul
      M0:  begin cs.rf_addr_sel = RA_0;  cs.rf_bus_en = 1'b1; cs.a_en = 1'b1; end
      M1:  begin cs.rf_addr_sel = RA_RS; cs.rf_bus_en = 1'b1; cs.b_en = 1'b1; end
      M2:  begin cs.rf_addr_sel = RA_RT; cs.rf_bus_en = 1'b1; cs.c_en = 1'b1; end
      MITER: begin
        cs.alu_func = FA_ADDC; cs.alu_bus_en = 1'b1; cs.a_en = 1'b1;
        cs.b_en = 1'b1; cs.b_sel = 1'b1; cs.c_en = 1'b1; cs.c_sel = 1'b1;
      end
      M35: begin
        cs.alu_func = FA_ADDC; cs.alu_bus_en = 1'b1; cs.rf_addr_sel = RA_RD; cs.rf_wen = 1'b1;
      end
      // memory address A + B (load)
      L2, LA2: begin cs.alu_bus_en = 1'b1; cs.memreq_val = 1'b1; end
      L3, LA3: begin cs.rd_bus_en = 1'b1; cs.rf_addr_sel = RA_RT; cs.rf_wen = 1'b1; end
      LA4: begin
        cs.alu_func = FA_PLUS4; cs.alu_bus_en = 1'b1; cs.rf_addr_sel = RA_RS; cs.rf_wen = 1'b1;
      end
      // sw
      S0:  begin cs.rf_addr_sel = RA_RT; cs.rf_bus_en = 1'b1; cs.wd_en = 1'b1; end
      S3:  begin
        cs.alu_bus_en = 1'b1; cs.memreq_val = 1'b1; cs.memreq_type = MEM_WRITE;
      end
      // jumps
      J0, JA1: begin cs.iau_func = IAU_TS; cs.iau_bus_en = 1'b1; cs.b_en = 1'b1; end
      J1, JA2: begin cs.alu_func = FA_JT; cs.alu_bus_en = 1'b1; cs.pc_en = 1'b1; end
      JA0: begin cs.pc_bus_en = 1'b1; cs.rf_addr_sel = RA_31; cs.rf_wen = 1'b1; end
      JR0: begin cs.rf_addr_sel = RA_RS; cs.rf_bus_en = 1'b1; cs.pc_en = 1'b1; end
      // bne
      B2:  begin
        cs.iau_func = IAU_SIS; cs.iau_bus_en = 1'b1; cs.a_en = 1'b1; cs.alu_func = FA_CMP;
      end
      B3:  begin cs.pc_bus_en = 1'b1; cs.b_en = 1'b1; end
      B4:  begin cs.alu_bus_en = 1'b1; cs.pc_en = 1'b1; end
      // addu.mm
      MM0: begin cs.rf_addr_sel = RA_RS; cs.rf_bus_en = 1'b1; cs.memreq_val = 1'b1; end
      MM1: begin cs.rd_bus_en = 1'b1; cs.a_en = 1'b1; end
      MM2: begin cs.rf_addr_sel = RA_RT; cs.rf_bus_en = 1'b1; cs.memreq_val = 1'b1; end
      MM3: begin cs.rd_bus_en = 1'b1; cs.b_en = 1'b1; end
      MM4: begin cs.alu_bus_en = 1'b1; cs.wd_en = 1'b1; end
      MM5: begin
        cs.rf_addr_sel = RA_RD; cs.rf_bus_en = 1'b1; cs.memreq_val = 1'b1;
        cs.memreq_type = MEM_WRITE;
      end
      default: ;
    endcase
  end

endmodule
