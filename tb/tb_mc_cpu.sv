// tb_mc_cpu: end-to-end test of the multi-cycle CPU at its default size.
//
// For each of NPROG programs the testbench generates a random program in
// the unified memory: 31 loads that fill the registers from a random data
// area, then a random mix of R-type (add, sub, and, or, slt), LW, SW,
// forward BEQ (some with equal registers, so taken) and forward J, ended by
// a jump to itself. An instruction-level model in the testbench runs the
// same program. The CPU must produce the same sequence of register writes
// and memory writes, the same final registers and data memory, and take
// exactly 5 cycles per LW, 4 per SW and R-type, and 3 per BEQ and J.
// It also counts how often each mechanism of the design was used (every
// FSM state, taken and not-taken branches, the IR holding its instruction
// while the shared memory serves data, the Target register feeding the PC,
// a write to register 0 being dropped) and fails if one never happened.
module tb_mc_cpu;
  import mc_pkg::*;

  localparam int NPROG      = 4;
  localparam int WORDS      = 1024;           // default MEM_WORDS of mc_cpu
  localparam int CODE_WORDS = 400;
  localparam int DATA_BASE  = 512;            // word index of the data area
  localparam int DATA_WORDS = 256;

  logic clk = 1'b0, rst;
  logic [31:0] pc, ir, mem_addr, mem_wdata, reg_wdata;
  logic [3:0]  state;
  logic        mem_write, reg_write;
  logic [4:0]  reg_waddr;
  int checks = 0, failures = 0;

  mc_cpu dut (
    .clk, .rst, .pc, .ir, .state, .mem_write, .mem_addr, .mem_wdata,
    .reg_write, .reg_waddr, .reg_wdata
  );

  always #5 clk = ~clk;

  // ---------------- program generation and reference model ----------------
  logic [31:0] prog [WORDS];
  logic [31:0] ref_mem [WORDS];
  logic [31:0] ref_reg [32];
  logic [36:0] exp_rw [$];    // {waddr, wdata}
  logic [63:0] exp_mw [$];    // {addr, wdata}
  int          exp_cycles;
  logic [31:0] halt_pc;

  function automatic logic [31:0] itype(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] rtype(int rs, int rt, int rd, logic [5:0] funct);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, funct};
  endfunction

  function automatic int latency(logic [5:0] op);
    case (op)
      6'h23: return 5;
      6'h2B, 6'h00: return 4;
      6'h04, 6'h02: return 3;
      default: return 2;
    endcase
  endfunction

  task automatic generate_program();
    logic [5:0] functs [5] = '{6'h20, 6'h22, 6'h24, 6'h25, 6'h2A};
    int halt = CODE_WORDS - 1;
    for (int i = 0; i < WORDS; i++) prog[i] = 32'h0;
    for (int i = 0; i < DATA_WORDS; i++) prog[DATA_BASE + i] = $urandom;
    for (int r = 1; r < 32; r++)
      prog[r - 1] = itype(6'h23, 0, r, (DATA_BASE + $urandom_range(0, DATA_WORDS - 1)) * 4);
    for (int i = 31; i < halt; i++) begin
      int kind = $urandom_range(0, 99);
      int rs = $urandom_range(0, 31), rt = $urandom_range(0, 31), rd = $urandom_range(0, 31);
      int off = (DATA_BASE + $urandom_range(0, DATA_WORDS - 1)) * 4;
      int k = $urandom_range(0, 3);
      if (i + 1 + k > halt) k = halt - i - 1;
      if (kind < 40)      prog[i] = rtype(rs, rt, rd, functs[$urandom_range(0, 4)]);
      else if (kind < 55) prog[i] = itype(6'h23, 0, rt, off);
      else if (kind < 70) prog[i] = itype(6'h2B, 0, rt, off);
      else if (kind < 90) prog[i] = itype(6'h04, rs, ($urandom_range(0, 2) == 0) ? rs : rt, k);
      else                prog[i] = {6'h02, 26'(i + 1 + k)};
    end
    prog[halt] = {6'h02, 26'(halt)};
    halt_pc = halt * 4;
  endtask

  // Instruction-level model: runs until the PC reaches the halt jump
  task automatic run_reference();
    logic [31:0] rpc = 0, ins, a, b, res;
    exp_rw.delete(); exp_mw.delete();
    exp_cycles = 0;
    for (int i = 0; i < WORDS; i++) ref_mem[i] = prog[i];
    for (int r = 0; r < 32; r++) ref_reg[r] = 0;
    while (rpc != halt_pc) begin
      ins = ref_mem[rpc[11:2]];
      exp_cycles += latency(ins[31:26]);
      a = ref_reg[ins[25:21]];
      b = ref_reg[ins[20:16]];
      rpc = rpc + 4;
      case (ins[31:26])
        6'h00: begin
          case (ins[5:0])
            6'h20: res = a + b;
            6'h22: res = a - b;
            6'h24: res = a & b;
            6'h25: res = a | b;
            6'h2A: res = ($signed(a) < $signed(b)) ? 1 : 0;
            default: res = a + b;
          endcase
          exp_rw.push_back({ins[15:11], res});
          if (ins[15:11] != 0) ref_reg[ins[15:11]] = res;
        end
        6'h23: begin
          res = a + {{16{ins[15]}}, ins[15:0]};
          exp_rw.push_back({ins[20:16], ref_mem[res[11:2]]});
          if (ins[20:16] != 0) ref_reg[ins[20:16]] = ref_mem[res[11:2]];
        end
        6'h2B: begin
          res = a + {{16{ins[15]}}, ins[15:0]};
          exp_mw.push_back({res, b});
          ref_mem[res[11:2]] = b;
        end
        6'h04: if (a == b) rpc = rpc + {{14{ins[15]}}, ins[15:0], 2'b00};
        6'h02: rpc = {rpc[31:28], ins[25:0], 2'b00};
        default: ;
      endcase
    end
  endtask

  // ---------------- monitors ----------------
  int n_state [10];
  int n_beq_taken, n_beq_not, n_ir_held, n_r0_write, n_lat_checks;
  logic running = 1'b0;
  int cyc, last_fetch;
  logic [31:0] ir_at_decode;

  always @(posedge clk) if (running) begin
    automatic int s = int'(state);
    if (s < 10) n_state[s]++;
    if (s == 1) ir_at_decode = ir;
    if ((s == 3 || s == 4 || s == 5)) begin
      if (ir === ir_at_decode) n_ir_held++;
      else begin failures++; $display("IR changed during data access"); end
      checks++;
    end
    if (s == 8) begin
      if (dut.u_dp.pc_en) n_beq_taken++; else n_beq_not++;
    end
    if (reg_write) begin
      logic [36:0] e;
      checks++;
      if (reg_waddr == 0) n_r0_write++;
      if (exp_rw.size() == 0) begin failures++; $display("unexpected register write"); end
      else begin
        e = exp_rw.pop_front();
        if ({reg_waddr, reg_wdata} !== e) begin
          failures++;
          $display("reg write r%0d=%h expected r%0d=%h", reg_waddr, reg_wdata, e[36:32], e[31:0]);
        end
      end
    end
    if (mem_write) begin
      logic [63:0] e;
      checks++;
      if (exp_mw.size() == 0) begin failures++; $display("unexpected memory write"); end
      else begin
        e = exp_mw.pop_front();
        if ({mem_addr, mem_wdata} !== e) begin
          failures++;
          $display("mem write [%h]=%h expected [%h]=%h", mem_addr, mem_wdata, e[63:32], e[31:0]);
        end
      end
    end
    // per-instruction latency: cycles from one fetch to the next
    if (s == 0) begin
      if (cyc > 0) begin
        checks++; n_lat_checks++;
        if (cyc - last_fetch != latency(ir[31:26])) begin
          failures++;
          $display("opcode %h took %0d cycles, expected %0d", ir[31:26], cyc - last_fetch, latency(ir[31:26]));
        end
      end
      last_fetch = cyc;
    end
    cyc++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    foreach (n_state[i]) n_state[i] = 0;
    n_beq_taken = 0; n_beq_not = 0; n_ir_held = 0; n_r0_write = 0; n_lat_checks = 0;
    for (int p = 0; p < NPROG; p++) begin
      generate_program();
      run_reference();
      for (int i = 0; i < WORDS; i++) dut.u_dp.u_mem.mem[i] = prog[i];
      @(negedge clk); rst = 1'b1;
      @(negedge clk); rst = 1'b0;
      cyc = 0; last_fetch = 0; running = 1'b1;
      // run until the halt jump is fetched
      while (!(state == 4'd0 && pc == halt_pc)) @(negedge clk);
      running = 1'b0;
      checks++;
      if (cyc != exp_cycles) begin
        failures++; $display("program %0d: %0d cycles, expected %0d", p, cyc, exp_cycles);
      end
      checks++;
      if (exp_rw.size() != 0 || exp_mw.size() != 0) begin
        failures++; $display("program %0d: %0d register and %0d memory writes missing", p, exp_rw.size(), exp_mw.size());
      end
      for (int r = 0; r < 32; r++) begin
        checks++;
        if (dut.u_dp.u_rf.regs[r] !== ref_reg[r] && r != 0) begin
          failures++; $display("program %0d: r%0d=%h expected %h", p, r, dut.u_dp.u_rf.regs[r], ref_reg[r]);
        end
      end
      for (int i = DATA_BASE; i < DATA_BASE + DATA_WORDS; i++) begin
        checks++;
        if (dut.u_dp.u_mem.mem[i] !== ref_mem[i]) begin
          failures++; $display("program %0d: mem[%0d]=%h expected %h", p, i, dut.u_dp.u_mem.mem[i], ref_mem[i]);
        end
      end
      $display("program %0d: %0d cycles", p, cyc);
    end
    $display("state visits 0..9: %p", n_state);
    $display("beq taken %0d, not taken %0d, IR held during data access %0d, writes to r0 %0d, latency checks %0d",
             n_beq_taken, n_beq_not, n_ir_held, n_r0_write, n_lat_checks);
    foreach (n_state[i]) begin
      checks++; if (n_state[i] == 0) begin failures++; $display("state %0d never visited", i); end
    end
    checks += 4;
    if (n_beq_taken == 0) begin failures++; $display("no taken branch"); end
    if (n_beq_not == 0)   begin failures++; $display("no untaken branch"); end
    if (n_ir_held == 0)   begin failures++; $display("no data access"); end
    if (n_r0_write == 0)  begin failures++; $display("no write to r0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
