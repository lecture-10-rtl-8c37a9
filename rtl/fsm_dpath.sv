// fsm_dpath: bus-based datapath of the FSM processor.
//
// A single 32-bit datapath bus connects everything. Five sources can drive
// it, each through its own enable: the PC (pc_bus_en), the immediate unit
// (iau_bus_en), the ALU (alu_bus_en), the register file (rf_bus_en) and the
// memory read-data register RD (rd_bus_en). The lecture draws these as
// tri-state drivers; here they form a multiplexer, at most one enable may
// be on (asserted), and an undriven bus reads 0. The bus feeds PC, IR, A,
// B, C and WD (each with an enable), the register file write data and the
// memory address. B can instead load B << 1 (b_sel) and C can load C >> 1
// (c_sel), which, with the ALU's "+?" function, performs one multiply step
// per cycle. WD holds store data for memreq.data. RD loads the memory
// response on every clock edge. Only the PC is reset (synchronously, to
// RESET_PC).
module fsm_dpath
  import parc_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst,
  input  fsm_ctrl_t       cs,
  output logic [XLEN-1:0] ir,
  output logic            eq,
  output logic [XLEN-1:0] memreq_addr,
  output logic [XLEN-1:0] memreq_data,
  input  logic [XLEN-1:0] memresp_data
);

  logic [XLEN-1:0] bus;
  logic [XLEN-1:0] pc, ir_q, a, b, c, wd, rd;
  logic [XLEN-1:0] iau_out, alu_out, rf_out;
  logic [4:0]      rf_addr;

  always_comb begin
    bus = '0;
    unique case (1'b1)
      cs.pc_bus_en:  bus = pc;
      cs.iau_bus_en: bus = iau_out;
      cs.alu_bus_en: bus = alu_out;
      cs.rf_bus_en:  bus = rf_out;
      cs.rd_bus_en:  bus = rd;
      default:       bus = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)            pc <= RESET_PC;
    else if (cs.pc_en)  pc <= bus;
    if (cs.ir_en) ir_q <= bus;
    if (cs.a_en)  a    <= bus;
    if (cs.b_en)  b    <= cs.b_sel ? (b << 1) : bus;
    if (cs.c_en)  c    <= cs.c_sel ? (c >> 1) : bus;
    if (cs.wd_en) wd   <= bus;
    rd <= memresp_data;
  end

  assign ir = ir_q;

  fsm_iau u_iau (.ir(ir_q), .func(cs.iau_func), .result(iau_out));
  fsm_alu u_alu (.a(a), .b(b), .c0(c[0]), .func(cs.alu_func), .result(alu_out), .eq(eq));

  always_comb begin
    unique case (cs.rf_addr_sel)
      RA_31:   rf_addr = 5'd31;
      RA_0:    rf_addr = 5'd0;
      RA_RS:   rf_addr = ir_q[25:21];
      RA_RT:   rf_addr = ir_q[20:16];
      RA_RD:   rf_addr = ir_q[15:11];
      default: rf_addr = 5'd0;
    endcase
  end

  fsm_regfile #(.NREGS(32), .XLEN(XLEN)) u_rf (
    .clk(clk), .addr(rf_addr), .wen(cs.rf_wen && !rst), .wdata(bus), .rdata(rf_out)
  );

  assign memreq_addr = bus;
  assign memreq_data = wd;

  // Only one driver may be enabled on the bus in any cycle.
  a_bus_onehot: assert property (@(posedge clk) disable iff (rst)
    $onehot0({cs.pc_bus_en, cs.iau_bus_en, cs.alu_bus_en, cs.rf_bus_en, cs.rd_bus_en}));

endmodule
