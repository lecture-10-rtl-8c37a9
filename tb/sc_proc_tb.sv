// sc_proc_tb: runs generated programs on the single-cycle processor.
//
// The testbench provides a dual-ported combinational memory of its own.
// For each of several seeds it builds a program (see parc_tb_pkg) that also
// uses lw.ai, runs it
// on the reference model and on the processor, then checks the whole
// memory image (data area and register dump) and that the processor
// reached the halt address after exactly as many cycles as instructions
// were executed (CPI = 1).
module sc_proc_tb;
  import parc_pkg::*;
  import parc_tb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic      imemreq_val, dmemreq_val;
  mem_req_t  imemreq, dmemreq;
  mem_resp_t imemresp, dmemresp;
  bit [31:0] mem [MEMW];

  int checks = 0, failures = 0;

  sc_proc dut (.clk, .rst, .imemreq_val, .imemreq, .imemresp, .dmemreq_val, .dmemreq, .dmemresp);

  assign imemresp.data = mem[imemreq.addr[11:2]];
  assign dmemresp.data = mem[dmemreq.addr[11:2]];
  always_ff @(posedge clk)
    if (dmemreq_val && dmemreq.typ == MEM_WRITE) mem[dmemreq.addr[11:2]] <= dmemreq.data;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    prog_gen g;
    parc_iss iss;
    int cycles, bad;
    for (int seed = 1; seed <= 4; seed++) begin
      g = new(); g.build(seed, 1, 40);
      iss = new(); iss.mem = g.img; iss.run(g.halt_pc, 100000);
      mem = g.img;
      rst = 1'b1;
      @(posedge clk); @(posedge clk);
      #1 rst = 1'b0;
      cycles = 0;
      while (imemreq.addr != g.halt_pc && cycles < 20000) begin
        @(posedge clk); #1 cycles++;
      end
      check(cycles == iss.ninst,
            $sformatf("seed %0d: %0d cycles for %0d instructions", seed, cycles, iss.ninst));
      check(imemreq_val, "instruction request valid");
      bad = 0;
      for (int i = 0; i < MEMW; i++) if (mem[i] !== iss.mem[i]) begin
        if (bad < 5) $display("  word 0x%0h: got %h expected %h", i * 4, mem[i], iss.mem[i]);
        bad++;
      end
      check(bad == 0, $sformatf("seed %0d: %0d memory words differ", seed, bad));
      for (int i = 1; i < 32; i++)
        check(mem[DUMP_B/4 + i] == iss.r[i], $sformatf("seed %0d: r%0d", seed, i));
      $display("seed %0d: %0d instructions in %0d cycles", seed, iss.ninst, cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
