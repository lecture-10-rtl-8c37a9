// fsm_regfile_tb: random reads and writes through the single address port,
// against an array model; register 0 must stay zero.
module fsm_regfile_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [4:0]  addr;
  logic [31:0] rdata, wdata;
  logic        wen;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  fsm_regfile dut (.clk, .addr, .wen, .wdata, .rdata);

  initial begin
    for (int i = 0; i < 32; i++) begin
      wen = 1'b1; addr = 5'(i); wdata = $urandom; model[i] = (i == 0) ? 32'd0 : wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      addr = 5'($urandom); wen = 1'($urandom); wdata = $urandom;
      #1;
      checks++;
      if (rdata != model[addr]) begin failures++; $display("FAIL r%0d", addr); end
      @(posedge clk); #1;
      if (wen && addr != 0) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
