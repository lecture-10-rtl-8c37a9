// sc_regfile_tb: random writes and reads on all ports of the two-read,
// two-write register file, against an array model; checks that register 0
// stays zero, that a write is visible after the clock edge, and that write
// port 1 wins when both ports write the same register.
module sc_regfile_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [4:0]  raddr0, raddr1, waddr;
  logic [31:0] rdata0, rdata1, wdata;
  logic        wen, wen1;
  logic [4:0]  waddr1;
  logic [31:0] wdata1;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  sc_regfile dut (.clk, .raddr0, .rdata0, .raddr1, .rdata1, .wen, .waddr, .wdata, .wen1, .waddr1, .wdata1);

  initial begin
    wen1 = 1'b0; waddr1 = '0; wdata1 = '0;
    wen = 1'b0; raddr0 = '0; raddr1 = '0; waddr = '0; wdata = '0;
    // fill all registers first
    for (int i = 0; i < 32; i++) begin
      wen = 1'b1; waddr = 5'(i); wdata = $urandom; model[i] = (i == 0) ? 32'd0 : wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      raddr0 = 5'($urandom); raddr1 = 5'($urandom);
      wen = 1'($urandom); waddr = 5'($urandom); wdata = $urandom;
      wen1 = ($urandom % 4 == 0); waddr1 = (n % 8 == 0) ? waddr : 5'($urandom); wdata1 = $urandom;
      #1;
      checks += 2;
      if (rdata0 != model[raddr0]) begin failures++; $display("FAIL rd0 r%0d", raddr0); end
      if (rdata1 != model[raddr1]) begin failures++; $display("FAIL rd1 r%0d", raddr1); end
      @(posedge clk); #1;
      if (wen && waddr != 0) model[waddr] = wdata;
      if (wen1 && waddr1 != 0) model[waddr1] = wdata1;
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
