// sc_proc: single-cycle PARCv1 processor.
//
// Control unit and datapath joined by the control and status signals
// (instruction word and eq). Every instruction completes in one clock
// cycle (CPI = 1): the instruction is fetched, decoded, its registers read,
// the arithmetic done, data memory read or written, the register written
// and the PC updated between two clock edges. Both memories must therefore
// answer combinationally in the same cycle. Memory requests carry byte
// addresses. Memory request valids are forced low during reset.
// Besides the nine base instructions it runs the auto-incrementing load
// lw.ai, which writes both rt (loaded word) and rs (rs + 4) in the same
// cycle through the register file's second write port. The datapath
// structure and control table follow the course; the MIPS32 encodings,
// the byte-addressed memory ports and the second write port are this
// design's own choices.
module sc_proc
  import parc_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic      clk,
  input  logic      rst,
  output logic      imemreq_val,
  output mem_req_t  imemreq,
  input  mem_resp_t imemresp,
  output logic      dmemreq_val,
  output mem_req_t  dmemreq,
  input  mem_resp_t dmemresp
);

  sc_ctrl_t        cs;
  logic [XLEN-1:0] ir;
  logic            eq;
  logic [XLEN-1:0] imem_addr, dmem_addr, dmem_wdata;

  sc_ctrl u_ctrl (.ir(ir), .eq(eq), .cs(cs));

  sc_dpath #(.RESET_PC(RESET_PC)) u_dpath (
    .clk(clk), .rst(rst), .cs(cs), .ir(ir), .eq(eq),
    .imem_addr(imem_addr), .imem_data(imemresp.data),
    .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata), .dmem_rdata(dmemresp.data)
  );

  assign imemreq_val = cs.imemreq_val && !rst;
  assign imemreq     = '{typ: MEM_READ, addr: imem_addr, data: '0};
  assign dmemreq_val = cs.dmemreq_val && !rst;
  assign dmemreq     = '{typ: cs.dmemreq_type, addr: dmem_addr, data: dmem_wdata};

endmodule
