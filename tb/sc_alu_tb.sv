// sc_alu_tb: random operands for each single-cycle ALU function (add,
// compare, copy op1), including equal operands for compare; checks result
// and eq.
module sc_alu_tb;
  import parc_pkg::*;
  logic [31:0]  op0, op1, result;
  sc_alu_func_e func;
  logic         eq;
  int checks = 0, failures = 0;
  logic [31:0]  exp;

  sc_alu dut (.op0, .op1, .func, .result, .eq);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      op0 = $urandom; op1 = ($urandom % 4 == 0) ? op0 : $urandom;
      case (n % 3)
        0: begin func = SC_ALU_ADD; exp = op0 + op1; end
        1: begin func = SC_ALU_CMP; exp = (op0 == op1) ? 1 : 0; end
        default: begin func = SC_ALU_CP1; exp = op1; end
      endcase
      #1;
      checks++;
      if (result != exp) begin failures++; $display("FAIL func %s %h %h -> %h", func.name(), op0, op1, result); end
      if (func == SC_ALU_CMP) begin
        checks++;
        if (eq != (op0 == op1)) begin failures++; $display("FAIL eq"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
