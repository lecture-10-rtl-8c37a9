// sc_dpath: datapath of the single-cycle processor.
//
// The PC register feeds the instruction memory address and a +4 adder. The
// returned instruction word is the "ir" of this cycle: its rs/rt fields
// address the two register-file read ports, its immediate and target fields
// feed sext, j_tgen and br_tgen. The ALU takes rs and the op1 mux output
// (rt, pc_plus4, sext); the multiplier takes rs and rt. wb_sel picks the
// ALU result, the product or the load data for the register write port.
// The ALU result is also the data-memory address and rt the store data.
// A second +4 adder on the rs value feeds the register file's second write
// port (rs), used only by lw.ai (this design's addition). The
// pc_sel mux picks pc_plus4, br_targ, j_targ or the rs value (jr) as the
// next PC. Everything between the PC edge and the next edge is
// combinational: one instruction per cycle. Synchronous active-high reset
// loads RESET_PC.
module sc_dpath
  import parc_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst,
  input  sc_ctrl_t        cs,
  output logic [XLEN-1:0] ir,
  output logic            eq,
  output logic [XLEN-1:0] imem_addr,
  input  logic [XLEN-1:0] imem_data,
  output logic [XLEN-1:0] dmem_addr,
  output logic [XLEN-1:0] dmem_wdata,
  input  logic [XLEN-1:0] dmem_rdata
);

  logic [XLEN-1:0] pc, pc_next, pc_plus4;
  logic [XLEN-1:0] rs_val, rs_plus4, rt_val, op1, alu_out, mul_out, wb_data;
  logic [XLEN-1:0] sext, j_targ, br_targ;
  logic [4:0]      waddr;

  assign ir        = imem_data;
  assign imem_addr = pc;
  assign pc_plus4  = pc + 32'd4;

  always_comb begin
    unique case (cs.pc_sel)
      PC_PLUS4: pc_next = pc_plus4;
      PC_BR:    pc_next = br_targ;
      PC_J:     pc_next = j_targ;
      PC_JR:    pc_next = rs_val;
      default:  pc_next = pc_plus4;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

  sc_immgen u_immgen (
    .ir(ir), .pc_plus4(pc_plus4), .sext(sext), .j_targ(j_targ), .br_targ(br_targ)
  );

  always_comb begin
    unique case (cs.rf_waddr)
      WA_RD:   waddr = ir[15:11];
      WA_RT:   waddr = ir[20:16];
      WA_R31:  waddr = 5'd31;
      default: waddr = ir[15:11];
    endcase
  end

  sc_regfile #(.NREGS(32), .XLEN(XLEN)) u_rf (
    .clk(clk),
    .raddr0(ir[25:21]), .rdata0(rs_val),
    .raddr1(ir[20:16]), .rdata1(rt_val),
    .wen(cs.rf_wen && !rst), .waddr(waddr), .wdata(wb_data),
    .wen1(cs.rf_wen_rs && !rst), .waddr1(ir[25:21]), .wdata1(rs_plus4)
  );

  assign rs_plus4 = rs_val + 32'd4;

  always_comb begin
    unique case (cs.op1_sel)
      OP1_RF:   op1 = rt_val;
      OP1_PC4:  op1 = pc_plus4;
      OP1_SEXT: op1 = sext;
      default:  op1 = rt_val;
    endcase
  end

  sc_alu u_alu (.op0(rs_val), .op1(op1), .func(cs.alu_func), .result(alu_out), .eq(eq));
  sc_mul u_mul (.op0(rs_val), .op1(rt_val), .product(mul_out));

  always_comb begin
    unique case (cs.wb_sel)
      WB_ALU:  wb_data = alu_out;
      WB_MUL:  wb_data = mul_out;
      WB_MEM:  wb_data = dmem_rdata;
      default: wb_data = alu_out;
    endcase
  end

  assign dmem_addr  = alu_out;
  assign dmem_wdata = rt_val;

endmodule
