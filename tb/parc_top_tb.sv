// parc_top_tb: end-to-end test of both processors through the top level,
// with every parameter at its default.
//
// For each seed: hold both systems in reset, load a generated program
// through each host port (both use lw.ai, the FSM one also addu.mm),
// release reset, let both run to their halt loops, hold them in reset again
// and read every memory word back through the host ports, comparing with
// the reference model. The cycle counts are checked too: one cycle per
// instruction for the single-cycle processor, the micro-code total for the
// FSM processor. It also counts how often each mechanism of the two
// designs happened (taken and not-taken bne, jal/jr, loads, stores, the
// multiplier, the FSM multiply steps, the extension instructions) and
// counts a failure for any that never did.
module parc_top_tb;
  import parc_pkg::*;
  import parc_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        sc_rst = 1'b1, fsm_rst = 1'b1;
  logic        sc_host_wen = 1'b0, fsm_host_wen = 1'b0;
  logic [31:0] sc_host_addr = '0, sc_host_wdata = '0, sc_host_rdata;
  logic [31:0] fsm_host_addr = '0, fsm_host_wdata = '0, fsm_host_rdata;
  fsm_state_e  fsm_state;

  int checks = 0, failures = 0;

  parc_top u_top (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters, observed on the designs themselves
  int n_sc_mul = 0, n_sc_lw = 0, n_sc_sw = 0, n_sc_br_taken = 0, n_sc_br_not = 0,
      n_sc_jal = 0, n_sc_jr = 0, n_sc_j = 0, n_sc_lwai = 0;
  int n_f_miter = 0, n_f_b_taken = 0, n_f_b_not = 0, n_f_lwai = 0, n_f_mm = 0,
      n_f_load = 0, n_f_store = 0, n_f_jal = 0, n_f_jr = 0;
  fsm_state_e prev_state;

  always @(posedge clk) begin
    if (!sc_rst) begin
      sc_ctrl_t c;
      c = u_top.u_sc_proc.cs;
      if (c.wb_sel == WB_MUL && c.rf_wen) n_sc_mul++;
      if (c.wb_sel == WB_MEM && c.rf_wen) n_sc_lw++;
      if (c.dmemreq_val && c.dmemreq_type == MEM_WRITE) n_sc_sw++;
      if (c.alu_func == SC_ALU_CMP && c.pc_sel == PC_BR) n_sc_br_taken++;
      if (c.alu_func == SC_ALU_CMP && c.pc_sel == PC_PLUS4) n_sc_br_not++;
      if (c.rf_waddr == WA_R31 && c.rf_wen) n_sc_jal++;
      if (c.pc_sel == PC_JR) n_sc_jr++;
      if (c.pc_sel == PC_J) n_sc_j++;
      if (c.rf_wen_rs) n_sc_lwai++;
    end
    if (!fsm_rst) begin
      if (fsm_state == MITER) n_f_miter++;
      if (fsm_state == B3) n_f_b_taken++;
      if (prev_state == B2 && fsm_state == F0) n_f_b_not++;
      if (fsm_state == LA4) n_f_lwai++;
      if (fsm_state == MM5) n_f_mm++;
      if (fsm_state == L3) n_f_load++;
      if (fsm_state == S3) n_f_store++;
      if (fsm_state == JA0) n_f_jal++;
      if (fsm_state == JR0) n_f_jr++;
    end
    prev_state = fsm_state;
  end

  initial begin
    prog_gen gs, gf;
    parc_iss ref_s, ref_f;
    longint sc_cyc, f_cyc;
    bit sc_done, f_done;
    int bad_s, bad_f;
    for (int seed = 21; seed <= 23; seed++) begin
      gs = new(); gs.build(seed, 1, 60);
      gf = new(); gf.build(seed + 100, 2, 60);
      ref_s = new();  ref_s.mem = gs.img;  ref_s.run(gs.halt_pc, 100000);
      ref_f = new(); ref_f.mem = gf.img; ref_f.run(gf.halt_pc, 100000);
      // load both memories through the host ports
      sc_rst = 1'b1; fsm_rst = 1'b1;
      for (int i = 0; i < MEMW; i++) begin
        sc_host_wen = 1'b1;  sc_host_addr = i * 4;  sc_host_wdata = gs.img[i];
        fsm_host_wen = 1'b1; fsm_host_addr = i * 4; fsm_host_wdata = gf.img[i];
        @(posedge clk); #1;
      end
      sc_host_wen = 1'b0; fsm_host_wen = 1'b0;
      @(posedge clk); #1;
      sc_rst = 1'b0; fsm_rst = 1'b0;
      sc_cyc = 0; f_cyc = 0; sc_done = 0; f_done = 0;
      while (!(sc_done && f_done) && f_cyc < 100000) begin
        if (!sc_done && u_top.sc_imemreq.addr == gs.halt_pc) begin sc_done = 1; sc_rst = 1'b1; end
        if (!f_done && fsm_state == F0 && u_top.fsm_memreq.addr == gf.halt_pc) begin
          f_done = 1; fsm_rst = 1'b1;
        end
        @(posedge clk); #1;
        if (!sc_done) sc_cyc++;
        if (!f_done) f_cyc++;
      end
      sc_rst = 1'b1; fsm_rst = 1'b1;
      check(sc_cyc == ref_s.ninst, $sformatf("seed %0d: single-cycle %0d cycles for %0d instructions",
                                          seed, sc_cyc, ref_s.ninst));
      check(f_cyc == ref_f.fsm_cycles, $sformatf("seed %0d: FSM %0d cycles, expected %0d",
                                               seed, f_cyc, ref_f.fsm_cycles));
      // read back through the host ports
      bad_s = 0; bad_f = 0;
      for (int i = 0; i < MEMW; i++) begin
        sc_host_addr = i * 4; fsm_host_addr = i * 4; #1;
        if (sc_host_rdata != ref_s.mem[i]) bad_s++;
        if (fsm_host_rdata != ref_f.mem[i]) bad_f++;
      end
      check(bad_s == 0, $sformatf("seed %0d: %0d single-cycle memory words differ", seed, bad_s));
      check(bad_f == 0, $sformatf("seed %0d: %0d FSM memory words differ", seed, bad_f));
      $display("seed %0d: single-cycle %0d inst / %0d cycles, FSM %0d inst / %0d cycles (CPI %0.2f)",
               seed, ref_s.ninst, sc_cyc, ref_f.ninst, f_cyc, real'(f_cyc) / ref_f.ninst);
    end
    $display("single-cycle: mul %0d lw %0d sw %0d bne taken %0d not taken %0d j %0d jal %0d jr %0d lw.ai %0d",
             n_sc_mul, n_sc_lw, n_sc_sw, n_sc_br_taken, n_sc_br_not, n_sc_j, n_sc_jal, n_sc_jr, n_sc_lwai);
    $display("FSM: multiply steps %0d, bne taken %0d not taken %0d, lw %0d sw %0d, jal %0d jr %0d, lw.ai %0d addu.mm %0d",
             n_f_miter, n_f_b_taken, n_f_b_not, n_f_load, n_f_store, n_f_jal, n_f_jr, n_f_lwai, n_f_mm);
    check(n_sc_mul > 0, "single-cycle mul never happened");
    check(n_sc_lw > 0, "single-cycle load never happened");
    check(n_sc_sw > 0, "single-cycle store never happened");
    check(n_sc_br_taken > 0, "single-cycle taken branch never happened");
    check(n_sc_br_not > 0, "single-cycle not-taken branch never happened");
    check(n_sc_j > 0 && n_sc_jal > 0 && n_sc_jr > 0, "single-cycle jumps missing");
    check(n_sc_lwai > 0, "single-cycle lw.ai never happened");
    check(n_f_miter > 0 && n_f_miter % MUL_STEPS == 0, "FSM multiply steps missing or not a multiple of 32");
    check(n_f_b_taken > 0, "FSM taken branch never happened");
    check(n_f_b_not > 0, "FSM not-taken branch never happened");
    check(n_f_load > 0 && n_f_store > 0, "FSM load/store missing");
    check(n_f_jal > 0 && n_f_jr > 0, "FSM jal/jr missing");
    check(n_f_lwai > 0, "FSM lw.ai never happened");
    check(n_f_mm > 0, "FSM addu.mm never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
