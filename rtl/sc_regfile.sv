// sc_regfile: register file of the single-cycle processor.
//
// Two combinational read ports (used for rs and rt) and two write ports
// that update on the rising clock edge, so an instruction reads its
// operands and writes its results in the same cycle. Write port 0 takes the
// normal result; write port 1 exists only for the auto-incrementing load
// lw.ai, which also writes its base register, and wins when both ports
// write the same register. Register 0 always reads zero and ignores writes
// (the MIPS convention, which the FSM micro-code also relies on). The
// registers are not reset. The second write port is this design's way of
// doing lw.ai in one cycle.
module sc_regfile #(
  parameter int NREGS = 32,
  parameter int XLEN  = 32,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic [AW-1:0]   raddr0,
  output logic [XLEN-1:0] rdata0,
  input  logic [AW-1:0]   raddr1,
  output logic [XLEN-1:0] rdata1,
  input  logic            wen,
  input  logic [AW-1:0]   waddr,
  input  logic [XLEN-1:0] wdata,
  input  logic            wen1,
  input  logic [AW-1:0]   waddr1,
  input  logic [XLEN-1:0] wdata1
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (wen && waddr != '0) regs[waddr] <= wdata;
    if (wen1 && waddr1 != '0) regs[waddr1] <= wdata1;
  end

  assign rdata0 = (raddr0 == '0) ? '0 : regs[raddr0];
  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];

endmodule
