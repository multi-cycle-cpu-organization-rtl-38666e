// tb_mc_datapath: self-checking test of the shared datapath on its own.
// The testbench plays the control unit: it steps the datapath through the
// states of each instruction of a short hand-written program (loads, an add,
// a subtract, a store, a taken and a not-taken BEQ, a jump, slt, and, or)
// with control values written out here, and checks the PC after every
// instruction, the register file, the stored word and the Zero flag against
// results worked out by hand.
module tb_mc_datapath;
  import mc_pkg::*;

  logic clk = 1'b0, rst;
  ctrl_t ctrl;
  logic [5:0] opcode;
  logic [31:0] pc, ir, mem_addr, mem_wdata, rf_wdata;
  logic [4:0] rf_waddr;
  logic zero;
  int checks = 0, failures = 0;

  mc_datapath #(.MEM_WORDS(128)) dut (
    .clk, .rst, .ctrl, .opcode, .pc, .ir, .zero, .mem_addr, .mem_wdata, .rf_waddr, .rf_wdata
  );

  always #5 clk = ~clk;

  function automatic logic [31:0] itype(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] rtype(int rs, int rt, int rd, logic [5:0] funct);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, funct};
  endfunction

  // One state's control values, from the state diagram
  function automatic ctrl_t ctl(int s);
    ctrl_t c = '0;
    case (s)
      0: begin c.mem_read = 1; c.ir_write = 1; c.alu_sel_b = SELB_FOUR; c.pc_write = 1; end
      1: begin c.alu_sel_b = SELB_IMM_SH; c.target_write = 1; end
      2: begin c.alu_sel_a = 1; c.alu_sel_b = SELB_IMM; c.iord = 1; end
      3: begin c.mem_read = 1; c.alu_sel_a = 1; c.alu_sel_b = SELB_IMM; c.iord = 1; end
      4: begin c.mem_read = 1; c.alu_sel_a = 1; c.alu_sel_b = SELB_IMM; c.iord = 1;
               c.mem_to_reg = 1; c.reg_write = 1; end
      5: begin c.mem_write = 1; c.alu_sel_a = 1; c.alu_sel_b = SELB_IMM; c.iord = 1; end
      6: begin c.alu_sel_a = 1; c.alu_op = ALUOP_FUNCT; end
      7: begin c.alu_sel_a = 1; c.alu_op = ALUOP_FUNCT; c.reg_dst = 1; c.reg_write = 1; end
      8: begin c.alu_sel_a = 1; c.alu_op = ALUOP_SUB; c.pc_write_cond = 1; c.pc_source = PCSRC_TARGET; end
      9: begin c.pc_write = 1; c.pc_source = PCSRC_JUMP; end
      default: c = '0;
    endcase
    return c;
  endfunction

  task automatic step(int s);
    @(negedge clk); ctrl = ctl(s);
  endtask

  // Run one instruction through the given states, then check the PC
  task automatic exec(int states[$], logic [31:0] exp_pc, string name, int exp_zero_last = -1);
    foreach (states[i]) begin
      step(states[i]);
      if (i == states.size() - 1 && exp_zero_last >= 0) begin
        #1; checks++;
        if (zero !== exp_zero_last[0]) begin failures++; $display("%s: zero=%b", name, zero); end
      end
    end
    @(negedge clk); ctrl = '0; #1;
    checks++;
    if (pc !== exp_pc) begin failures++; $display("%s: pc=%h expected %h", name, pc, exp_pc); end
  endtask

  task automatic check_reg(int r, logic [31:0] v);
    checks++;
    if (dut.u_rf.regs[r] !== v) begin
      failures++; $display("r%0d = %h expected %h", r, dut.u_rf.regs[r], v);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) dut.u_mem.mem[i] = 32'h0;
    dut.u_mem.mem[0]  = itype(6'h23, 0, 1, 32'h100);   // lw  $1, 0x100($0)
    dut.u_mem.mem[1]  = itype(6'h23, 0, 2, 32'h104);   // lw  $2, 0x104($0)
    dut.u_mem.mem[2]  = rtype(1, 2, 3, 6'h20);         // add $3, $1, $2
    dut.u_mem.mem[3]  = rtype(1, 2, 4, 6'h22);         // sub $4, $1, $2
    dut.u_mem.mem[4]  = itype(6'h2B, 0, 3, 32'h108);   // sw  $3, 0x108($0)
    dut.u_mem.mem[5]  = itype(6'h04, 1, 1, 1);         // beq $1, $1, +1 (taken)
    dut.u_mem.mem[6]  = rtype(1, 1, 5, 6'h20);         // skipped
    dut.u_mem.mem[7]  = itype(6'h04, 1, 2, 5);         // beq $1, $2, +5 (not taken)
    dut.u_mem.mem[8]  = {6'h02, 26'h10};               // j 0x40
    dut.u_mem.mem[16] = rtype(2, 1, 6, 6'h2A);         // slt $6, $2, $1
    dut.u_mem.mem[17] = rtype(1, 2, 7, 6'h24);         // and $7, $1, $2
    dut.u_mem.mem[18] = rtype(1, 2, 8, 6'h25);         // or  $8, $1, $2
    dut.u_mem.mem[19] = itype(6'h23, 1, 9, 32'h105);  // lw $9, 0x105($1): address 0x10C
    dut.u_mem.mem[64] = 32'd7;
    dut.u_mem.mem[65] = 32'd5;
    dut.u_mem.mem[67] = 32'hCAFE_F00D;
    ctrl = '0; rst = 1'b1;
    @(negedge clk); @(negedge clk); rst = 1'b0;

    exec('{0, 1, 2, 3, 4}, 32'h04, "lw $1");
    checks++; if (ir !== dut.u_mem.mem[0]) begin failures++; $display("IR=%h", ir); end
    checks++; if (opcode !== 6'h23) begin failures++; $display("opcode=%h", opcode); end
    check_reg(1, 7);
    exec('{0, 1, 2, 3, 4}, 32'h08, "lw $2");  check_reg(2, 5);
    exec('{0, 1, 6, 7}, 32'h0C, "add");       check_reg(3, 12);
    exec('{0, 1, 6, 7}, 32'h10, "sub");       check_reg(4, 2);
    exec('{0, 1, 2, 5}, 32'h14, "sw");
    checks++; if (dut.u_mem.mem[66] !== 32'd12) begin failures++; $display("stored %h", dut.u_mem.mem[66]); end
    exec('{0, 1, 8}, 32'h1C, "beq taken", 1);
    exec('{0, 1, 8}, 32'h20, "beq not taken", 0);
    check_reg(5, 0);
    exec('{0, 1, 9}, 32'h40, "j");
    exec('{0, 1, 6, 7}, 32'h44, "slt");       check_reg(6, 1);
    exec('{0, 1, 6, 7}, 32'h48, "and");       check_reg(7, 5);
    exec('{0, 1, 6, 7}, 32'h4C, "or");        check_reg(8, 7);
    exec('{0, 1, 2, 3, 4}, 32'h50, "lw base"); check_reg(9, 32'hCAFE_F00D);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
