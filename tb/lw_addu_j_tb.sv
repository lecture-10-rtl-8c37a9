// lw_addu_j_tb: the three-instruction sequence lw, addu, j run on both
// processors through the top level, with the cycle count of each.
//
// Program: lw r2, 0x100(r0); addu r3, r2, r2; j 12; and at 12 a jump to
// itself. The single-cycle processor must reach address 12 after 3 cycles
// (one per instruction). The FSM processor must take 7 + 6 + 5 = 18
// cycles (3 fetch cycles plus 4, 3 and 2 micro-operation cycles). After
// the measured part the program stores r3 to 0x104 and halts, and the
// result is read back through the host ports.
module lw_addu_j_tb;
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

  task automatic load(int addr, bit [31:0] w);
    sc_host_wen = 1; fsm_host_wen = 1;
    sc_host_addr = addr; fsm_host_addr = addr; sc_host_wdata = w; fsm_host_wdata = w;
    @(posedge clk); #1;
    sc_host_wen = 0; fsm_host_wen = 0;
  endtask

  initial begin
    int sc_cyc, f_cyc;
    bit [31:0] v;
    v = 32'h1234_5678;
    load(0,  e_lw(2, 'h100, 0));
    load(4,  e_addu(3, 2, 2));
    load(8,  e_j(12));
    load(12, e_sw(3, 'h104, 0));     // after the measured sequence
    load(16, e_j(16));
    load('h100, v);
    load('h104, 0);
    sc_rst = 0; fsm_rst = 0;
    sc_cyc = 0; f_cyc = 0;
    for (int n = 1; n <= 100; n++) begin
      @(posedge clk); #1;
      if (sc_cyc == 0 && u_top.sc_imemreq.addr == 12) sc_cyc = n;
      if (f_cyc == 0 && fsm_state == F0 && u_top.fsm_memreq.addr == 12) f_cyc = n;
    end
    check(sc_cyc == 3, $sformatf("single-cycle took %0d cycles for lw, addu, j", sc_cyc));
    check(f_cyc == 18, $sformatf("FSM took %0d cycles for lw, addu, j", f_cyc));
    #1 sc_rst = 1; fsm_rst = 1;
    sc_host_addr = 'h104; fsm_host_addr = 'h104; #1;
    check(sc_host_rdata == v + v, "single-cycle result");
    check(fsm_host_rdata == v + v, "FSM result");
    $display("lw, addu, j: single-cycle %0d cycles, FSM %0d cycles", sc_cyc, f_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
