// mc_pkg: shared types and constants of the multi-cycle CPU.
//
// The machine executes a five-instruction MIPS subset (R-type, LW, SW, BEQ,
// J) in 3 to 5 clock cycles on one shared datapath. This package holds the
// instruction encodings, the meaning of every multi-bit mux select, the
// control FSM's state numbering and the bundle of control signals that the
// control unit hands to the datapath. The select encodings and the state
// numbers follow the control-signal tables and the state diagram of the
// design; the opcode and function-code values are the standard MIPS-I ones,
// which the design itself leaves open.
package mc_pkg;

  // Primary opcodes, IR[31:26]
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_BEQ   = 6'h04,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // R-type function codes, IR[5:0]
  localparam logic [5:0] FUNCT_ADD = 6'h20;
  localparam logic [5:0] FUNCT_SUB = 6'h22;
  localparam logic [5:0] FUNCT_AND = 6'h24;
  localparam logic [5:0] FUNCT_OR  = 6'h25;
  localparam logic [5:0] FUNCT_SLT = 6'h2A;

  // ALUOp from the control unit to the ALU control
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,
    ALUOP_SUB   = 2'b01,
    ALUOP_FUNCT = 2'b10
  } aluop_e;

  // Operation performed by the ALU
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_SLT = 3'd4
  } alu_fn_e;

  // ALUSelB: second ALU operand
  typedef enum logic [1:0] {
    SELB_RT     = 2'b00,  // register file read data 2
    SELB_FOUR   = 2'b01,  // constant 4
    SELB_IMM    = 2'b10,  // sign-extended IR[15:0]
    SELB_IMM_SH = 2'b11   // sign-extended IR[15:0] shifted left by 2
  } alusel_b_e;

  // PCSource: value offered to the PC
  typedef enum logic [1:0] {
    PCSRC_ALU    = 2'b00,  // ALU result (PC + 4)
    PCSRC_TARGET = 2'b01,  // Target register (branch target)
    PCSRC_JUMP   = 2'b10   // {PC[31:28], IR[25:0], 2'b00}
  } pcsource_e;

  // Control FSM states, numbered as in the state diagram
  typedef enum logic [3:0] {
    S_FETCH      = 4'd0,
    S_DECODE     = 4'd1,
    S_MEM_ADDR   = 4'd2,
    S_LW_ACCESS  = 4'd3,
    S_LW_WB      = 4'd4,
    S_SW_ACCESS  = 4'd5,
    S_R_EXEC     = 4'd6,
    S_R_WB       = 4'd7,
    S_BEQ        = 4'd8,
    S_JUMP       = 4'd9
  } state_e;

  // Every control signal the control unit drives into the datapath
  typedef struct packed {
    logic      mem_read;
    logic      mem_write;
    logic      iord;           // 0: PC addresses memory, 1: ALU result
    logic      ir_write;
    logic      reg_dst;        // 0: rt, 1: rd
    logic      reg_write;
    logic      mem_to_reg;     // 0: ALU result, 1: memory read data
    logic      alu_sel_a;      // 0: PC, 1: register read data 1
    alusel_b_e alu_sel_b;
    aluop_e    alu_op;
    logic      pc_write;
    logic      pc_write_cond;
    pcsource_e pc_source;
    logic      target_write;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{
    mem_read: 1'b0, mem_write: 1'b0, iord: 1'b0, ir_write: 1'b0,
    reg_dst: 1'b0, reg_write: 1'b0, mem_to_reg: 1'b0, alu_sel_a: 1'b0,
    alu_sel_b: SELB_RT, alu_op: ALUOP_ADD, pc_write: 1'b0,
    pc_write_cond: 1'b0, pc_source: PCSRC_ALU, target_write: 1'b0
  };

endpackage
