// fsm_alu_tb: random A, B, C[0] for each FSM ALU function (+4, +, +?, cmp,
// jt); checks result and eq.
module fsm_alu_tb;
  import parc_pkg::*;
  logic [31:0]   a, b, result, exp;
  logic          c0, eq;
  fsm_alu_func_e func;
  int checks = 0, failures = 0;

  fsm_alu dut (.a, .b, .c0, .func, .result, .eq);

  initial begin
    for (int n = 0; n < 5000; n++) begin
      a = $urandom; b = ($urandom % 4 == 0) ? a : $urandom; c0 = 1'($urandom);
      case (n % 5)
        0: begin func = FA_PLUS4; exp = a + 4; end
        1: begin func = FA_ADD;   exp = a + b; end
        2: begin func = FA_ADDC;  exp = c0 ? a + b : a; end
        3: begin func = FA_CMP;   exp = (a == b) ? 1 : 0; end
        default: begin func = FA_JT; exp = (a & 32'hF000_0000) | (b & 32'h0FFF_FFFF); end
      endcase
      #1;
      checks += 2;
      if (result != exp) begin failures++; $display("FAIL %s a=%h b=%h c0=%b -> %h", func.name(), a, b, c0, result); end
      if (eq != (a == b)) begin failures++; $display("FAIL eq"); end
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
