// mc_datapath: the shared datapath of the multi-cycle CPU.
//
// One ALU, one memory and a handful of multiplexers replace the ALU, the two
// adders and the separate instruction and data memories of a single-cycle
// machine. Values that must survive from one cycle to the next are kept in
// three write-enabled registers: the PC, the instruction register (IR) and
// the branch Target register. There are no operand or ALU-output registers:
// the register numbers stay in IR for the whole instruction, so the register
// file keeps producing the same operands, and the ALU recomputes the
// load/store address in every memory state.
//
// Multiplexers (select value -> source):
//   IorD      0 PC, 1 ALU result                          -> memory address
//   RegDst    0 IR[20:16] (rt), 1 IR[15:11] (rd)          -> write register
//   MemtoReg  0 ALU result, 1 memory read data            -> write data
//   ALUSelA   0 PC, 1 register read data 1                -> ALU A
//   ALUSelB   0 read data 2, 1 constant 4, 2 sign-extended IR[15:0],
//             3 sign-extended IR[15:0] << 2               -> ALU B
//   PCSource  0 ALU result, 1 Target register, 2 jump address
//             {PC[31:28], IR[25:0], 2'b00}                -> PC input
// The PC is written when PCWrite is high, or when PCWriteCond is high and
// the ALU's Zero output is set (BEQ). Memory write data is register read
// data 2. All of this follows the design's datapath figures; the way PCWrite,
// PCWriteCond and Zero combine is read from them rather than stated in
// words. Everything is combinational between the registers; every register
// and memory write happens on the rising clock edge.
module mc_datapath
  import mc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  output logic [5:0]  opcode,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output logic        zero,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata
);

  logic [31:0] pc_next, target_q, mem_rdata;
  logic [31:0] rdata1, rdata2, alu_a, alu_b, alu_result;
  logic [31:0] imm_sext, imm_sext_sh, jump_addr;
  logic        pc_en;
  alu_fn_e     alu_fn;

  // Program counter
  assign pc_en = ctrl.pc_write | (ctrl.pc_write_cond & zero);

  en_reg #(.WIDTH(32)) u_pc (
    .clk, .rst, .en(pc_en), .d(pc_next), .q(pc)
  );

  // Shared memory, addressed by the PC or by the ALU
  assign mem_addr  = ctrl.iord ? alu_result : pc;
  assign mem_wdata = rdata2;

  unified_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk,
    .addr      (mem_addr),
    .mem_read  (ctrl.mem_read),
    .mem_write (ctrl.mem_write),
    .wdata     (mem_wdata),
    .rdata     (mem_rdata)
  );

  // Instruction register
  en_reg #(.WIDTH(32)) u_ir (
    .clk, .rst, .en(ctrl.ir_write), .d(mem_rdata), .q(ir)
  );

  assign opcode = ir[31:26];

  // Register file
  assign rf_waddr = ctrl.reg_dst ? ir[15:11] : ir[20:16];
  assign rf_wdata = ctrl.mem_to_reg ? mem_rdata : alu_result;

  regfile #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk, .rst,
    .raddr1 (ir[25:21]),
    .raddr2 (ir[20:16]),
    .we     (ctrl.reg_write),
    .waddr  (rf_waddr),
    .wdata  (rf_wdata),
    .rdata1 (rdata1),
    .rdata2 (rdata2)
  );

  // Immediate handling
  assign imm_sext    = {{16{ir[15]}}, ir[15:0]};
  assign imm_sext_sh = {imm_sext[29:0], 2'b00};
  assign jump_addr   = {pc[31:28], ir[25:0], 2'b00};

  // ALU and its operand selection
  assign alu_a = ctrl.alu_sel_a ? rdata1 : pc;

  always_comb begin
    unique case (ctrl.alu_sel_b)
      SELB_RT:     alu_b = rdata2;
      SELB_FOUR:   alu_b = 32'd4;
      SELB_IMM:    alu_b = imm_sext;
      SELB_IMM_SH: alu_b = imm_sext_sh;
      default:     alu_b = rdata2;
    endcase
  end

  alu_control u_aluctl (
    .alu_op (ctrl.alu_op),
    .funct  (ir[5:0]),
    .fn     (alu_fn)
  );

  alu #(.WIDTH(32)) u_alu (
    .a      (alu_a),
    .b      (alu_b),
    .fn     (alu_fn),
    .result (alu_result),
    .zero   (zero)
  );

  // Branch target register, loaded in the decode state
  en_reg #(.WIDTH(32)) u_target (
    .clk, .rst, .en(ctrl.target_write), .d(alu_result), .q(target_q)
  );

  // Next PC
  always_comb begin
    unique case (ctrl.pc_source)
      PCSRC_ALU:    pc_next = alu_result;
      PCSRC_TARGET: pc_next = target_q;
      PCSRC_JUMP:   pc_next = jump_addr;
      default:      pc_next = alu_result;
    endcase
  end

endmodule
