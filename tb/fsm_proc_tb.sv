// fsm_proc_tb: runs generated programs on the FSM processor.
//
// The testbench provides a single-ported combinational memory of its own.
// For each of several seeds it builds a program that also uses lw.ai and
// addu.mm, runs it on the reference model and on the processor, then checks
// the whole memory image, the register dump, and that the processor
// reached the halt address after exactly the number of cycles the
// micro-code sequences add up to (the reference model's FSM cycle count).
module fsm_proc_tb;
  import parc_pkg::*;
  import parc_tb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic       memreq_val;
  mem_req_t   memreq;
  mem_resp_t  memresp;
  fsm_state_e state;
  bit [31:0]  mem [MEMW];

  int checks = 0, failures = 0;

  fsm_proc dut (.clk, .rst, .memreq_val, .memreq, .memresp, .state);

  assign memresp.data = mem[memreq.addr[11:2]];
  always_ff @(posedge clk)
    if (memreq_val && memreq.typ == MEM_WRITE) mem[memreq.addr[11:2]] <= memreq.data;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    prog_gen g;
    parc_iss iss;
    longint cycles;
    int bad;
    for (int seed = 11; seed <= 14; seed++) begin
      g = new(); g.build(seed, 2, 40);
      iss = new(); iss.mem = g.img; iss.run(g.halt_pc, 100000);
      mem = g.img;
      rst = 1'b1;
      @(posedge clk); @(posedge clk);
      #1 rst = 1'b0;
      cycles = 0;
      // the halt jump is fetched in F0 with the bus (memreq.addr) = PC
      while (!(state == F0 && memreq.addr == g.halt_pc) && cycles < 100000) begin
        @(posedge clk); #1 cycles++;
      end
      check(cycles == iss.fsm_cycles,
            $sformatf("seed %0d: %0d cycles, expected %0d", seed, cycles, iss.fsm_cycles));
      bad = 0;
      for (int i = 0; i < MEMW; i++) if (mem[i] !== iss.mem[i]) begin
        if (bad < 5) $display("  word 0x%0h: got %h expected %h", i * 4, mem[i], iss.mem[i]);
        bad++;
      end
      check(bad == 0, $sformatf("seed %0d: %0d memory words differ", seed, bad));
      for (int i = 1; i < 32; i++)
        check(mem[DUMP_B/4 + i] == iss.r[i], $sformatf("seed %0d: r%0d", seed, i));
      $display("seed %0d: %0d instructions in %0d cycles (lw.ai %0d, addu.mm %0d, mul %0d)",
               seed, iss.ninst, cycles, iss.kind_cnt[K_LWAI], iss.kind_cnt[K_ADDUMM],
               iss.kind_cnt[K_MUL]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
