// sc_mul: multiplier of the single-cycle processor.
//
// Combinational, in parallel with the ALU: product = low 32 bits of
// op0 * op1 (rs times rt), selected for write-back by wb_sel for mul. It
// finishes within the single cycle, which is what makes that cycle long.
module sc_mul
  import parc_pkg::*;
(
  input  logic [XLEN-1:0] op0,
  input  logic [XLEN-1:0] op1,
  output logic [XLEN-1:0] product
);

  assign product = op0 * op1;

endmodule
