// fsm_regfile: single-ported register file of the FSM processor.
//
// One address (chosen outside by rf_addr_sel among 31, 0, rs, rt, rd) is
// used for both reading and writing, as the legacy-technology constraint
// allows only one port. Reading is combinational; the value goes onto the
// datapath bus when rf_bus_en is high. When wen is high the bus value is
// written on the rising clock edge. Register 0 reads zero and ignores
// writes, which is what the multiply sequence uses to clear A. The
// registers are not reset.
module fsm_regfile #(
  parameter int NREGS = 32,
  parameter int XLEN  = 32,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic [AW-1:0]   addr,
  input  logic            wen,
  input  logic [XLEN-1:0] wdata,
  output logic [XLEN-1:0] rdata
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (wen && addr != '0) regs[addr] <= wdata;
  end

  assign rdata = (addr == '0) ? '0 : regs[addr];

endmodule
