// sc_immgen_tb: random instructions and PCs; checks sign extension, jump
// target and branch target against arithmetic written out here.
module sc_immgen_tb;
  logic [31:0] ir, pc_plus4, sext, j_targ, br_targ;
  int checks = 0, failures = 0;
  int signed off;

  sc_immgen dut (.ir, .pc_plus4, .sext, .j_targ, .br_targ);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      ir = $urandom; pc_plus4 = $urandom & ~32'd3;
      #1;
      off = int'(signed'(ir[15:0]));
      checks += 3;
      if (sext != 32'(off)) begin failures++; $display("FAIL sext %h", ir); end
      if (j_targ != ((pc_plus4 & 32'hF000_0000) | ((ir & 32'h03FF_FFFF) * 4)))
        begin failures++; $display("FAIL j_targ %h", ir); end
      if (br_targ != 32'(int'(pc_plus4) + off * 4))
        begin failures++; $display("FAIL br_targ %h", ir); end
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
