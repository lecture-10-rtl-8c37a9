// parc_top: the two PARCv1 processors side by side.
//
// Two independent systems, sharing only the clock:
//   - the single-cycle processor (sc_proc) with a dual-ported combinational
//     memory (mem_dual), instruction port on memory port 0 and data port on
//     port 1; one instruction per cycle;
//   - the FSM processor (fsm_proc) with a single-ported combinational
//     memory (mem_single); several short cycles per instruction.
// Each system has its own synchronous reset. While a system is held in
// reset its memory's data port is handed to a host port (write enable,
// byte address, write data, read data; writes on the clock edge, reads
// combinational), which is how programs are loaded and results read back.
// The host port is this design's addition. Once reset is released both
// processors start fetching at address 0. fsm_state shows the FSM
// processor's control state.
module parc_top
  import parc_pkg::*;
#(
  parameter int WORDS = 1024
) (
  input  logic            clk,
  // single-cycle system
  input  logic            sc_rst,
  input  logic            sc_host_wen,
  input  logic [XLEN-1:0] sc_host_addr,
  input  logic [XLEN-1:0] sc_host_wdata,
  output logic [XLEN-1:0] sc_host_rdata,
  // FSM system
  input  logic            fsm_rst,
  input  logic            fsm_host_wen,
  input  logic [XLEN-1:0] fsm_host_addr,
  input  logic [XLEN-1:0] fsm_host_wdata,
  output logic [XLEN-1:0] fsm_host_rdata,
  output fsm_state_e      fsm_state
);

  // ---------------- single-cycle processor and dual-ported memory --------
  logic      sc_imemreq_val, sc_dmemreq_val, sc_port1_val;
  mem_req_t  sc_imemreq, sc_dmemreq, sc_port1_req;
  mem_resp_t sc_imemresp, sc_dmemresp;

  sc_proc u_sc_proc (
    .clk(clk), .rst(sc_rst),
    .imemreq_val(sc_imemreq_val), .imemreq(sc_imemreq), .imemresp(sc_imemresp),
    .dmemreq_val(sc_dmemreq_val), .dmemreq(sc_dmemreq), .dmemresp(sc_dmemresp)
  );

  assign sc_port1_val = sc_rst ? sc_host_wen : sc_dmemreq_val;
  assign sc_port1_req = sc_rst ? '{typ: sc_host_wen ? MEM_WRITE : MEM_READ,
                                   addr: sc_host_addr, data: sc_host_wdata}
                               : sc_dmemreq;

  mem_dual #(.WORDS(WORDS)) u_sc_mem (
    .clk(clk),
    .req0_val(sc_imemreq_val), .req0(sc_imemreq), .resp0(sc_imemresp),
    .req1_val(sc_port1_val), .req1(sc_port1_req), .resp1(sc_dmemresp)
  );

  assign sc_host_rdata = sc_dmemresp.data;

  // ---------------- FSM processor and single-ported memory ---------------
  logic      fsm_memreq_val, fsm_port_val;
  mem_req_t  fsm_memreq, fsm_port_req;
  mem_resp_t fsm_memresp;

  fsm_proc u_fsm_proc (
    .clk(clk), .rst(fsm_rst),
    .memreq_val(fsm_memreq_val), .memreq(fsm_memreq), .memresp(fsm_memresp),
    .state(fsm_state)
  );

  assign fsm_port_val = fsm_rst ? fsm_host_wen : fsm_memreq_val;
  assign fsm_port_req = fsm_rst ? '{typ: fsm_host_wen ? MEM_WRITE : MEM_READ,
                                    addr: fsm_host_addr, data: fsm_host_wdata}
                                : fsm_memreq;

  mem_single #(.WORDS(WORDS)) u_fsm_mem (
    .clk(clk), .req_val(fsm_port_val), .req(fsm_port_req), .resp(fsm_memresp)
  );

  assign fsm_host_rdata = fsm_memresp.data;

endmodule
