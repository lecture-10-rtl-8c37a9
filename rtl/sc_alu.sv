// sc_alu: arithmetic unit of the single-cycle processor.
//
// Combinational. op0 is always the rs register value; op1 comes from the
// op1 mux (rt, pc_plus4 or the sign-extended immediate). The functions are
// add (addu, addiu, lw and sw address), compare (bne, result 1 when equal)
// and copy op1 (passes pc_plus4 through for the jal link). The eq status for
// the control unit is bit 0 of the result, taken at the ALU output; it is
// meaningful when the compare function is selected. Compare and copy are
// this design's choice of encoding; the add function follows the control
// table.
module sc_alu
  import parc_pkg::*;
(
  input  logic [XLEN-1:0] op0,
  input  logic [XLEN-1:0] op1,
  input  sc_alu_func_e    func,
  output logic [XLEN-1:0] result,
  output logic            eq
);

  always_comb begin
    unique case (func)
      SC_ALU_ADD: result = op0 + op1;
      SC_ALU_CMP: result = {{(XLEN-1){1'b0}}, op0 == op1};
      SC_ALU_CP1: result = op1;
      default:    result = op0 + op1;
    endcase
  end

  assign eq = result[0];

endmodule
