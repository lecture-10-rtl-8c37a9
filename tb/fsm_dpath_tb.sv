// fsm_dpath_tb: drives the bus-based datapath with random control words
// (at most one bus driver at a time) and random memory responses, cycle by
// cycle, and compares the bus (memreq.addr), WD (memreq.data), IR and eq
// with a register-transfer model of PC, IR, A, B, C, WD, RD and the
// register file kept in the testbench.
module fsm_dpath_tb;
  import parc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  fsm_ctrl_t   cs;
  logic [31:0] ir, memreq_addr, memreq_data, memresp_data;
  logic        eq;
  logic [31:0] pc, irq, a, b, c, wd, rd, regs [32];
  bit          known [32];
  int checks = 0, failures = 0;

  fsm_dpath dut (.clk, .rst, .cs, .ir, .eq, .memreq_addr, .memreq_data, .memresp_data);

  initial begin
    logic [31:0] bus, si, iau, alu, rfv;
    int ra, src;
    cs = '0; memresp_data = '0;
    @(posedge clk); #1 rst = 1'b0;
    pc = 0;
    // initialise: RD <- data, IR/A/B/C/WD <- RD, r31 <- RD; other registers
    // are tracked as unknown until the random sequence writes them
    memresp_data = $urandom; @(posedge clk); #1 rd = memresp_data;
    cs.rd_bus_en = 1; cs.ir_en = 1; cs.a_en = 1; cs.b_en = 1; cs.c_en = 1; cs.wd_en = 1;
    memresp_data = $urandom;
    @(posedge clk); #1 irq = rd; a = rd; b = rd; c = rd; wd = rd; rd = memresp_data;
    cs = '0;
    begin
      cs.rd_bus_en = 1; cs.rf_wen = 1;
      cs.rf_addr_sel = RA_31;
      memresp_data = $urandom;
      @(posedge clk); #1 regs[31] = rd; rd = memresp_data;
    end
    foreach (known[i]) known[i] = (i == 0 || i == 31);
    regs[0] = 0;
    cs = '0;
    for (int n = 0; n < 4000; n++) begin
      cs = '0;
      cs.pc_en = 1'($urandom); cs.ir_en = ($urandom % 8 == 0);
      cs.a_en = 1'($urandom); cs.b_en = 1'($urandom); cs.b_sel = 1'($urandom);
      cs.c_en = 1'($urandom); cs.c_sel = 1'($urandom); cs.wd_en = 1'($urandom);
      cs.rf_wen = 1'($urandom);
      cs.rf_addr_sel = rf_addr_sel_e'($urandom % 5);
      cs.iau_func = iau_func_e'($urandom % 3);
      cs.alu_func = fsm_alu_func_e'($urandom % 5);
      src = $urandom % 6;
      case (src)
        0: cs.pc_bus_en = 1; 1: cs.iau_bus_en = 1; 2: cs.alu_bus_en = 1;
        3: cs.rf_bus_en = 1; 4: cs.rd_bus_en = 1; default: ;
      endcase
      memresp_data = $urandom;
      #1;
      case (cs.rf_addr_sel)
        RA_31: ra = 31; RA_0: ra = 0; RA_RS: ra = irq[25:21]; RA_RT: ra = irq[20:16];
        default: ra = irq[15:11];
      endcase
      // never read a register the model has not seen written
      if (!known[ra]) begin cs.rf_bus_en = 0; if (src == 3) src = 5; end
      #1;
      rfv = regs[ra];
      si  = {{16{irq[15]}}, irq[15:0]};
      case (cs.iau_func) IAU_SI: iau = si; IAU_TS: iau = {4'b0, irq[25:0], 2'b00}; default: iau = si << 2; endcase
      case (cs.alu_func)
        FA_PLUS4: alu = a + 4; FA_ADD: alu = a + b; FA_ADDC: alu = c[0] ? a + b : a;
        FA_CMP: alu = 32'(a == b); default: alu = {a[31:28], b[27:0]};
      endcase
      case (src) 0: bus = pc; 1: bus = iau; 2: bus = alu; 3: bus = rfv; 4: bus = rd; default: bus = 0; endcase
      checks += 4;
      if (memreq_addr != bus) begin failures++; $display("FAIL bus src %0d: %h exp %h", src, memreq_addr, bus); end
      if (memreq_data != wd)  begin failures++; $display("FAIL wd"); end
      if (ir != irq)          begin failures++; $display("FAIL ir"); end
      if (eq != (a == b))     begin failures++; $display("FAIL eq"); end
      @(posedge clk); #1;
      if (cs.pc_en) pc = bus;
      if (cs.ir_en) irq = bus;
      if (cs.a_en)  a = bus;
      if (cs.b_en)  b = cs.b_sel ? b << 1 : bus;
      if (cs.c_en)  c = cs.c_sel ? c >> 1 : bus;
      if (cs.wd_en) wd = bus;
      if (cs.rf_wen && ra != 0) begin regs[ra] = bus; known[ra] = 1; end
      rd = memresp_data;
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
