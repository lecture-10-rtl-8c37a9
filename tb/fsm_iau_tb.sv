// fsm_iau_tb: random IR values for each immediate function (si, ts, sis).
module fsm_iau_tb;
  import parc_pkg::*;
  logic [31:0] ir, result, exp;
  iau_func_e   func;
  int checks = 0, failures = 0;
  int signed   off;

  fsm_iau dut (.ir, .func, .result);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      ir = $urandom;
      off = int'(signed'(ir[15:0]));
      case (n % 3)
        0: begin func = IAU_SI;  exp = 32'(off); end
        1: begin func = IAU_TS;  exp = (ir & 32'h03FF_FFFF) * 4; end
        default: begin func = IAU_SIS; exp = 32'(off * 4); end
      endcase
      #1;
      checks++;
      if (result != exp) begin failures++; $display("FAIL %s %h -> %h", func.name(), ir, result); end
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
