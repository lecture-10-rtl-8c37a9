// sc_immgen: immediate and target generators of the single-cycle datapath.
//
// Three combinational functions of the instruction and of PC+4:
//   sext    = sign-extended ir[15:0]                 (addiu, lw, sw)
//   j_targ  = { pc_plus4[31:28], ir[25:0], 2'b00 }   (j, jal; "j_tgen")
//   br_targ = pc_plus4 + (sext(ir[15:0]) << 2)       (bne; "br_tgen")
// The split of j_targ mirrors the FSM processor's "jt" function; branch
// offsets count words relative to the following instruction.
module sc_immgen
  import parc_pkg::*;
(
  input  logic [XLEN-1:0] ir,
  input  logic [XLEN-1:0] pc_plus4,
  output logic [XLEN-1:0] sext,
  output logic [XLEN-1:0] j_targ,
  output logic [XLEN-1:0] br_targ
);

  assign sext    = {{(XLEN-16){ir[15]}}, ir[15:0]};
  assign j_targ  = {pc_plus4[31:28], ir[25:0], 2'b00};
  assign br_targ = pc_plus4 + {sext[XLEN-3:0], 2'b00};

endmodule
