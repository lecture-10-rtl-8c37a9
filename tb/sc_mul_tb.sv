// sc_mul_tb: random and corner operands; product must equal the low 32
// bits of the 64-bit product.
module sc_mul_tb;
  logic [31:0] op0, op1, product;
  logic [63:0] full;
  int checks = 0, failures = 0;

  sc_mul dut (.op0, .op1, .product);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      op0 = (n < 4) ? {32{n[0]}} : $urandom; op1 = (n < 4) ? {32{n[1]}} : $urandom;
      #1;
      full = 64'(op0) * 64'(op1);
      checks++;
      if (product != full[31:0]) begin failures++; $display("FAIL %h * %h = %h", op0, op1, product); end
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
