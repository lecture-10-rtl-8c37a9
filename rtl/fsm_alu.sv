// fsm_alu: ALU of the FSM processor.
//
// Combinational, on the A and B registers and bit 0 of the C register:
//   +4  : A + 4                   (PC increment during fetch)
//   +   : A + B
//   +?  : A + B if C[0] is 1, else A (one step of shift-and-add multiply)
//   cmp : A == B (1 or 0)
//   jt  : { A[31:28], B[27:0] }   (jump target)
// The function table is the lecture's. eq (A == B) goes to the control
// unit whatever function is selected; the result reaches the bus through
// alu_bus_en.
module fsm_alu
  import parc_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic            c0,
  input  fsm_alu_func_e   func,
  output logic [XLEN-1:0] result,
  output logic            eq
);

  assign eq = (a == b);

  always_comb begin
    unique case (func)
      FA_PLUS4: result = a + 32'd4;
      FA_ADD:   result = a + b;
      FA_ADDC:  result = c0 ? a + b : a;
      FA_CMP:   result = {{(XLEN-1){1'b0}}, eq};
      FA_JT:    result = {a[31:28], b[27:0]};
      default:  result = a + b;
    endcase
  end

endmodule
