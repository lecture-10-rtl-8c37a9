// mem_dual_tb: random reads and writes on both ports of the dual-ported
// memory against an array model. Reads must be combinational (same
// cycle); writes take effect at the clock edge; invalid requests must not
// write; on a same-word double write port 1 wins.
module mem_dual_tb;
  import parc_pkg::*;
  localparam int W = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic      v0, v1;
  mem_req_t  q0, q1;
  mem_resp_t p0, p1;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  mem_dual #(.WORDS(W)) dut (.clk, .req0_val(v0), .req0(q0), .resp0(p0),
                             .req1_val(v1), .req1(q1), .resp1(p1));

  initial begin
    v0 = 0; v1 = 0; q0 = '0; q1 = '0;
    for (int i = 0; i < W; i++) begin
      v1 = 1; q1 = '{typ: MEM_WRITE, addr: 32'(i * 4), data: $urandom}; model[i] = q1.data;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      v0 = 1'($urandom); v1 = 1'($urandom);
      q0 = '{typ: mem_type_e'($urandom % 2), addr: 32'(($urandom % W) * 4 + ($urandom % 4)), data: $urandom};
      q1 = '{typ: mem_type_e'($urandom % 2), addr: 32'(($urandom % W) * 4), data: $urandom};
      if (n % 7 == 0) q1.addr = q0.addr & ~32'd3;
      #1;
      checks += 2;
      if (p0.data != model[q0.addr[7:2]]) begin failures++; $display("FAIL port0 read"); end
      if (p1.data != model[q1.addr[7:2]]) begin failures++; $display("FAIL port1 read"); end
      @(posedge clk); #1;
      if (v0 && q0.typ == MEM_WRITE) model[q0.addr[7:2]] = q0.data;
      if (v1 && q1.typ == MEM_WRITE) model[q1.addr[7:2]] = q1.data;
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
