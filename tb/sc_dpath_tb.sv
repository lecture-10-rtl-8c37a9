// sc_dpath_tb: drives the single-cycle datapath with random control
// signals, random instruction words and random load data, cycle by cycle,
// and compares the memory addresses, store data, eq and the next PC with a
// register-level model kept in the testbench.
module sc_dpath_tb;
  import parc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  sc_ctrl_t    cs;
  logic [31:0] ir, imem_addr, imem_data, dmem_addr, dmem_wdata, dmem_rdata;
  logic        eq;
  logic [31:0] regs [32];
  logic [31:0] pc;
  int checks = 0, failures = 0;

  sc_dpath dut (.clk, .rst, .cs, .ir, .eq, .imem_addr, .imem_data,
                .dmem_addr, .dmem_wdata, .dmem_rdata);

  initial begin
    logic [31:0] rs, rt, se, pc4, op1, alu, wb, nxt;
    int wa;
    cs = '0; imem_data = '0; dmem_rdata = '0;
    @(posedge clk); #1 rst = 1'b0;
    pc = 0;
    // initialise all registers through addiu-like writes: alu = r0 + sext
    for (int i = 0; i < 32; i++) begin
      imem_data = {6'h09, 5'd0, 5'(i), 16'($urandom)};
      cs = '{pc_sel: PC_PLUS4, op1_sel: OP1_SEXT, alu_func: SC_ALU_ADD, wb_sel: WB_ALU,
             rf_waddr: WA_RT, rf_wen: 1'b1, rf_wen_rs: 1'b0, imemreq_val: 1'b1, dmemreq_val: 1'b0,
             dmemreq_type: MEM_READ};
      regs[i] = (i == 0) ? 0 : {{16{imem_data[15]}}, imem_data[15:0]};
      @(posedge clk); #1 pc = pc + 4;
    end
    for (int n = 0; n < 3000; n++) begin
      imem_data = $urandom; dmem_rdata = $urandom;
      cs.pc_sel   = sc_pc_sel_e'($urandom % 4);
      cs.op1_sel  = sc_op1_sel_e'($urandom % 3);
      cs.alu_func = sc_alu_func_e'($urandom % 3);
      cs.wb_sel   = sc_wb_sel_e'($urandom % 3);
      cs.rf_waddr = sc_waddr_sel_e'($urandom % 3);
      cs.rf_wen   = 1'($urandom);
      cs.rf_wen_rs = ($urandom % 4 == 0);
      if (n % 5 == 0) imem_data[20:16] = imem_data[25:21];   // equal operands sometimes
      #1;
      rs = regs[imem_data[25:21]]; rt = regs[imem_data[20:16]];
      se = {{16{imem_data[15]}}, imem_data[15:0]}; pc4 = pc + 4;
      op1 = (cs.op1_sel == OP1_RF) ? rt : (cs.op1_sel == OP1_PC4) ? pc4 : se;
      alu = (cs.alu_func == SC_ALU_ADD) ? rs + op1 : (cs.alu_func == SC_ALU_CMP) ? 32'(rs == op1) : op1;
      wb  = (cs.wb_sel == WB_ALU) ? alu : (cs.wb_sel == WB_MUL) ? rs * rt : dmem_rdata;
      case (cs.pc_sel)
        PC_PLUS4: nxt = pc4;
        PC_BR:    nxt = pc4 + (se << 2);
        PC_J:     nxt = {pc4[31:28], imem_data[25:0], 2'b00};
        default:  nxt = rs;
      endcase
      wa = (cs.rf_waddr == WA_RD) ? imem_data[15:11] : (cs.rf_waddr == WA_RT) ? imem_data[20:16] : 31;
      checks += 4;
      if (imem_addr != pc)  begin failures++; $display("FAIL pc %h exp %h", imem_addr, pc); end
      if (dmem_addr != alu) begin failures++; $display("FAIL alu/addr"); end
      if (dmem_wdata != rt) begin failures++; $display("FAIL store data"); end
      if (ir != imem_data)  begin failures++; $display("FAIL ir"); end
      if (cs.alu_func == SC_ALU_CMP) begin
        checks++;
        if (eq != (rs == op1)) begin failures++; $display("FAIL eq"); end
      end
      @(posedge clk); #1;
      if (cs.rf_wen && wa != 0) regs[wa] = wb;
      if (cs.rf_wen_rs && imem_data[25:21] != 0) regs[imem_data[25:21]] = rs + 4;
      pc = nxt;
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
