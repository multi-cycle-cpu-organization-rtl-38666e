// control_fsm: the control unit of the multi-cycle CPU.
//
// A Moore state machine with ten states. Every instruction first passes
// through state 0 (fetch: read memory at PC into IR, PC <= PC + 4 through
// the ALU) and state 1 (decode / register fetch: the ALU computes
// PC + 4 + (sign-extended offset << 2) into the Target register, in case the
// instruction is a branch). The opcode in IR then picks one short sequence:
//   LW : 2 address -> 3 memory read -> 4 write-back      (5 cycles)
//   SW : 2 address -> 5 memory write                     (4 cycles)
//   R  : 6 execute -> 7 write-back                       (4 cycles)
//   BEQ: 8 compare, PC <= Target if equal                (3 cycles)
//   J  : 9 PC <= {PC[31:28], IR[25:0], 00}               (3 cycles)
// after which it returns to state 0. The outputs depend on the state only
// and change right after the rising clock edge.
//
// The per-state signal values are those of the design's state diagram.
// Where the diagram leaves a value open, the value used here is the one the
// datapath needs: states 4 and 5 keep driving the load/store address
// (ALUSelB=10, IorD=1) because there is no address register; state 4 selects
// memory data for write-back; states 6 and 7 select rt as the second
// operand; state 9 selects the jump address. An opcode outside the five
// supported ones is skipped (state 1 returns to state 0) and reset is
// synchronous and active high: both are this design's choices.
module control_fsm
  import mc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [5:0]  opcode,
  output ctrl_t       ctrl,
  output state_e      state
);

  state_e state_q, state_d;

  always_ff @(posedge clk) begin
    if (rst) state_q <= S_FETCH;
    else     state_q <= state_d;
  end

  assign state = state_q;

  // Next state
  always_comb begin
    state_d = S_FETCH;
    unique case (state_q)
      S_FETCH:  state_d = S_DECODE;
      S_DECODE: begin
        case (opcode)
          OP_LW, OP_SW: state_d = S_MEM_ADDR;
          OP_RTYPE:     state_d = S_R_EXEC;
          OP_BEQ:       state_d = S_BEQ;
          OP_J:         state_d = S_JUMP;
          default:      state_d = S_FETCH;
        endcase
      end
      S_MEM_ADDR:  state_d = (opcode == OP_LW) ? S_LW_ACCESS : S_SW_ACCESS;
      S_LW_ACCESS: state_d = S_LW_WB;
      S_R_EXEC:    state_d = S_R_WB;
      S_LW_WB, S_SW_ACCESS, S_R_WB, S_BEQ, S_JUMP: state_d = S_FETCH;
      default:     state_d = S_FETCH;
    endcase
  end

  // Control outputs of each state
  always_comb begin
    ctrl = CTRL_IDLE;
    unique case (state_q)
      S_FETCH: begin
        ctrl.mem_read  = 1'b1;
        ctrl.alu_sel_a = 1'b0;
        ctrl.iord      = 1'b0;
        ctrl.ir_write  = 1'b1;
        ctrl.alu_sel_b = SELB_FOUR;
        ctrl.alu_op    = ALUOP_ADD;
        ctrl.pc_source = PCSRC_ALU;
        ctrl.pc_write  = 1'b1;
      end
      S_DECODE: begin
        ctrl.alu_sel_a    = 1'b0;
        ctrl.alu_sel_b    = SELB_IMM_SH;
        ctrl.alu_op       = ALUOP_ADD;
        ctrl.target_write = 1'b1;
      end
      S_MEM_ADDR: begin
        ctrl.alu_sel_a = 1'b1;
        ctrl.alu_sel_b = SELB_IMM;
        ctrl.alu_op    = ALUOP_ADD;
        ctrl.iord      = 1'b1;
      end
      S_LW_ACCESS: begin
        ctrl.mem_read  = 1'b1;
        ctrl.alu_sel_a = 1'b1;
        ctrl.alu_sel_b = SELB_IMM;
        ctrl.alu_op    = ALUOP_ADD;
        ctrl.iord      = 1'b1;
      end
      S_LW_WB: begin
        ctrl.mem_read   = 1'b1;
        ctrl.alu_sel_a  = 1'b1;
        ctrl.alu_sel_b  = SELB_IMM;
        ctrl.alu_op     = ALUOP_ADD;
        ctrl.iord       = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_dst    = 1'b0;
        ctrl.reg_write  = 1'b1;
      end
      S_SW_ACCESS: begin
        ctrl.mem_write = 1'b1;
        ctrl.alu_sel_a = 1'b1;
        ctrl.alu_sel_b = SELB_IMM;
        ctrl.alu_op    = ALUOP_ADD;
        ctrl.iord      = 1'b1;
      end
      S_R_EXEC: begin
        ctrl.alu_sel_a = 1'b1;
        ctrl.alu_sel_b = SELB_RT;
        ctrl.alu_op    = ALUOP_FUNCT;
      end
      S_R_WB: begin
        ctrl.alu_sel_a  = 1'b1;
        ctrl.alu_sel_b  = SELB_RT;
        ctrl.alu_op     = ALUOP_FUNCT;
        ctrl.reg_dst    = 1'b1;
        ctrl.mem_to_reg = 1'b0;
        ctrl.reg_write  = 1'b1;
      end
      S_BEQ: begin
        ctrl.alu_sel_a     = 1'b1;
        ctrl.alu_sel_b     = SELB_RT;
        ctrl.alu_op        = ALUOP_SUB;
        ctrl.pc_write_cond = 1'b1;
        ctrl.pc_source     = PCSRC_TARGET;
      end
      S_JUMP: begin
        ctrl.pc_write  = 1'b1;
        ctrl.pc_source = PCSRC_JUMP;
      end
      default: ctrl = CTRL_IDLE;
    endcase
  end

  // Rules the datapath relies on: IR is only loaded by a fetch from the PC,
  // the PC has one write condition at a time, and only R-type and LW
  // write-back states write the register file.
  assert property (@(posedge clk) disable iff (rst)
                   ctrl.ir_write |-> (ctrl.mem_read && !ctrl.iord))
    else $error("control_fsm: IRWrite without an instruction fetch");
  assert property (@(posedge clk) disable iff (rst)
                   !(ctrl.pc_write && ctrl.pc_write_cond))
    else $error("control_fsm: PCWrite and PCWriteCond together");
  assert property (@(posedge clk) disable iff (rst)
                   ctrl.reg_write |-> (state_q inside {S_LW_WB, S_R_WB}))
    else $error("control_fsm: RegWrite outside a write-back state");

endmodule
