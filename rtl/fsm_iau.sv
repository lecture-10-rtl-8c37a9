// fsm_iau: immediate arithmetic unit of the FSM processor.
//
// Combinational, on the IR register:
//   si  : sext(IR[15:0])          (addiu, lw, sw offsets)
//   ts  : IR[25:0] << 2           (jump target, zero-extended)
//   sis : sext(IR[15:0]) << 2     (branch offset)
// The function table is the lecture's. The result reaches the bus through
// iau_bus_en.
module fsm_iau
  import parc_pkg::*;
(
  input  logic [XLEN-1:0] ir,
  input  iau_func_e       func,
  output logic [XLEN-1:0] result
);

  logic [XLEN-1:0] si;
  assign si = {{(XLEN-16){ir[15]}}, ir[15:0]};

  always_comb begin
    unique case (func)
      IAU_SI:  result = si;
      IAU_TS:  result = {4'b0, ir[25:0], 2'b00};
      IAU_SIS: result = {si[XLEN-3:0], 2'b00};
      default: result = si;
    endcase
  end

endmodule
