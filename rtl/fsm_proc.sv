// fsm_proc: FSM (multi-cycle) PARCv1 processor.
//
// Control unit and bus-based datapath joined by control signals and the
// IR / eq status. It uses one memory port for both instruction fetch and
// data, and a single-ported register file, so each instruction takes
// several cycles (see fsm_ctrl for the per-instruction counts; CPI > 1)
// but each cycle is short: one register transfer over the bus. The memory
// must answer combinationally within the cycle; memreq.addr is the bus
// value and memreq.data the WD register. The request valid is forced low
// during reset. The control state is brought out for observation.
module fsm_proc
  import parc_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic      clk,
  input  logic      rst,
  output logic      memreq_val,
  output mem_req_t  memreq,
  input  mem_resp_t memresp,
  output fsm_state_e state
);

  fsm_ctrl_t       cs;
  logic [XLEN-1:0] ir;
  logic            eq;
  logic [XLEN-1:0] addr, wdata;

  fsm_ctrl u_ctrl (.clk(clk), .rst(rst), .ir(ir), .eq(eq), .cs(cs), .state(state));

  fsm_dpath #(.RESET_PC(RESET_PC)) u_dpath (
    .clk(clk), .rst(rst), .cs(cs), .ir(ir), .eq(eq),
    .memreq_addr(addr), .memreq_data(wdata), .memresp_data(memresp.data)
  );

  assign memreq_val = cs.memreq_val && !rst;
  assign memreq     = '{typ: cs.memreq_type, addr: addr, data: wdata};

endmodule
