// mem_single_tb: random reads and writes on the single-ported memory
// against an array model. Reads are combinational; valid writes take
// effect at the clock edge; invalid requests must not write.
module mem_single_tb;
  import parc_pkg::*;
  localparam int W = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic      v;
  mem_req_t  q;
  mem_resp_t p;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  mem_single #(.WORDS(W)) dut (.clk, .req_val(v), .req(q), .resp(p));

  initial begin
    for (int i = 0; i < W; i++) begin
      v = 1; q = '{typ: MEM_WRITE, addr: 32'(i * 4), data: $urandom}; model[i] = q.data;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      v = 1'($urandom);
      q = '{typ: mem_type_e'($urandom % 2), addr: 32'(($urandom % W) * 4 + ($urandom % 4)), data: $urandom};
      #1;
      checks++;
      if (p.data != model[q.addr[7:2]]) begin failures++; $display("FAIL read"); end
      @(posedge clk); #1;
      if (v && q.typ == MEM_WRITE) model[q.addr[7:2]] = q.data;
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
