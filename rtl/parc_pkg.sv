// parc_pkg: types and constants shared by the two PARCv1 processors.
//
// PARCv1 is a small MIPS-like instruction set: addu, addiu, mul, lw, sw, j,
// jal, jr and bne, plus the two extension instructions lw.ai and addu.mm.
// The field positions (rs = ir[25:21], rt = ir[20:16], imm = ir[15:0],
// targ = ir[25:0]) are those of the datapath drawings. The opcode and
// function-code values are the MIPS32 ones; the two extension encodings are
// this design's own choice. Memory requests and responses are packed
// structs; a request is {type, addr, data} with byte addresses, and a
// response is {data}.
package parc_pkg;

  localparam int XLEN = 32;

  // Major opcodes, ir[31:26]
  localparam logic [5:0] OP_SPECIAL  = 6'h00;
  localparam logic [5:0] OP_SPECIAL2 = 6'h1C;
  localparam logic [5:0] OP_ADDIU    = 6'h09;
  localparam logic [5:0] OP_LW       = 6'h23;
  localparam logic [5:0] OP_SW       = 6'h2B;
  localparam logic [5:0] OP_J        = 6'h02;
  localparam logic [5:0] OP_JAL      = 6'h03;
  localparam logic [5:0] OP_BNE      = 6'h05;
  localparam logic [5:0] OP_LWAI     = 6'h3B;  // lw.ai, this design's choice

  // Function codes, ir[5:0]
  localparam logic [5:0] FN_ADDU   = 6'h21;    // under OP_SPECIAL
  localparam logic [5:0] FN_JR     = 6'h08;    // under OP_SPECIAL
  localparam logic [5:0] FN_ADDUMM = 6'h28;    // addu.mm, this design's choice
  localparam logic [5:0] FN_MUL    = 6'h02;    // under OP_SPECIAL2

  typedef enum logic {
    MEM_READ  = 1'b0,
    MEM_WRITE = 1'b1
  } mem_type_e;

  typedef struct packed {
    mem_type_e        typ;
    logic [XLEN-1:0]  addr;
    logic [XLEN-1:0]  data;
  } mem_req_t;

  typedef struct packed {
    logic [XLEN-1:0]  data;
  } mem_resp_t;

  // Decoded instruction kinds, used by both control units
  typedef enum logic [3:0] {
    I_ADDU, I_ADDIU, I_MUL, I_LW, I_SW, I_J, I_JAL, I_JR, I_BNE,
    I_LWAI, I_ADDUMM, I_ILLEGAL
  } inst_e;

  function automatic inst_e decode_inst(input logic [31:0] ir);
    unique case (ir[31:26])
      OP_SPECIAL: begin
        if      (ir[5:0] == FN_ADDU)   decode_inst = I_ADDU;
        else if (ir[5:0] == FN_JR)     decode_inst = I_JR;
        else if (ir[5:0] == FN_ADDUMM) decode_inst = I_ADDUMM;
        else                           decode_inst = I_ILLEGAL;
      end
      OP_SPECIAL2: decode_inst = (ir[5:0] == FN_MUL) ? I_MUL : I_ILLEGAL;
      OP_ADDIU:    decode_inst = I_ADDIU;
      OP_LW:       decode_inst = I_LW;
      OP_SW:       decode_inst = I_SW;
      OP_J:        decode_inst = I_J;
      OP_JAL:      decode_inst = I_JAL;
      OP_BNE:      decode_inst = I_BNE;
      OP_LWAI:     decode_inst = I_LWAI;
      default:     decode_inst = I_ILLEGAL;
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // Single-cycle processor control signals
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    PC_PLUS4 = 2'd0,
    PC_BR    = 2'd1,
    PC_J     = 2'd2,
    PC_JR    = 2'd3
  } sc_pc_sel_e;

  typedef enum logic [1:0] {
    OP1_RF    = 2'd0,
    OP1_PC4   = 2'd1,
    OP1_SEXT  = 2'd2
  } sc_op1_sel_e;

  typedef enum logic [1:0] {
    SC_ALU_ADD = 2'd0,
    SC_ALU_CMP = 2'd1,
    SC_ALU_CP1 = 2'd2
  } sc_alu_func_e;

  typedef enum logic [1:0] {
    WB_ALU = 2'd0,
    WB_MUL = 2'd1,
    WB_MEM = 2'd2
  } sc_wb_sel_e;

  typedef enum logic [1:0] {
    WA_RD  = 2'd0,
    WA_RT  = 2'd1,
    WA_R31 = 2'd2
  } sc_waddr_sel_e;

  typedef struct packed {
    sc_pc_sel_e    pc_sel;
    sc_op1_sel_e   op1_sel;
    sc_alu_func_e  alu_func;
    sc_wb_sel_e    wb_sel;
    sc_waddr_sel_e rf_waddr;
    logic          rf_wen;
    logic          rf_wen_rs;   // second write port: R[rs] <- R[rs] + 4 (lw.ai)
    logic          imemreq_val;
    logic          dmemreq_val;
    mem_type_e     dmemreq_type;
  } sc_ctrl_t;

  // ---------------------------------------------------------------------
  // FSM processor control signals
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    FA_PLUS4 = 3'd0,   // A + 4
    FA_ADD   = 3'd1,   // A + B
    FA_ADDC  = 3'd2,   // A +? B : A + B if C[0], else A
    FA_CMP   = 3'd3,   // A == B
    FA_JT    = 3'd4    // { A[31:28], B[27:0] }
  } fsm_alu_func_e;

  typedef enum logic [1:0] {
    IAU_SI  = 2'd0,    // sext(IR[15:0])
    IAU_TS  = 2'd1,    // IR[25:0] << 2
    IAU_SIS = 2'd2     // sext(IR[15:0]) << 2
  } iau_func_e;

  typedef enum logic [2:0] {
    RA_31 = 3'd0,
    RA_0  = 3'd1,
    RA_RS = 3'd2,
    RA_RT = 3'd3,
    RA_RD = 3'd4
  } rf_addr_sel_e;

  typedef struct packed {
    logic          pc_en;
    logic          ir_en;
    logic          a_en;
    logic          b_en;
    logic          b_sel;      // 0: bus, 1: B << 1
    logic          c_en;
    logic          c_sel;      // 0: bus, 1: C >> 1
    logic          wd_en;
    logic          rf_wen;
    rf_addr_sel_e  rf_addr_sel;
    iau_func_e     iau_func;
    fsm_alu_func_e alu_func;
    logic          pc_bus_en;
    logic          iau_bus_en;
    logic          alu_bus_en;
    logic          rf_bus_en;
    logic          rd_bus_en;
    logic          memreq_val;
    mem_type_e     memreq_type;
  } fsm_ctrl_t;

  // FSM control states, named after the micro-operation sequences. MITER is
  // the repeated multiply step M3..M34.
  typedef enum logic [5:0] {
    F0, F1, F2,
    A0, A1, A2,
    AI0, AI1, AI2,
    M0, M1, M2, MITER, M35,
    L0, L1, L2, L3,
    S0, S1, S2, S3,
    J0, J1,
    JA0, JA1, JA2,
    JR0,
    B0, B1, B2, B3, B4,
    LA0, LA1, LA2, LA3, LA4,
    MM0, MM1, MM2, MM3, MM4, MM5
  } fsm_state_e;

  localparam int MUL_STEPS = 32;   // M3..M34

endpackage
