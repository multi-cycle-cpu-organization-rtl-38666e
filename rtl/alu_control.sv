// alu_control: turns the control unit's ALUOp into an ALU operation.
//
// ALUOp 00 asks for an add (PC increment, branch target, load/store
// address), 01 for a subtract (BEQ compare) and 10 hands the choice to the
// instruction's function field IR[5:0] (R-type). Combinational. The
// function-code values are the standard MIPS ones for add, sub, and, or and
// slt; an unknown function code, and the unused ALUOp 11, fall back to add,
// which is this design's choice.
module alu_control
  import mc_pkg::*;
(
  input  aluop_e      alu_op,
  input  logic [5:0]  funct,
  output alu_fn_e     fn
);

  always_comb begin
    fn = ALU_ADD;
    case (alu_op)
      ALUOP_ADD: fn = ALU_ADD;
      ALUOP_SUB: fn = ALU_SUB;
      ALUOP_FUNCT: begin
        case (funct)
          FUNCT_ADD: fn = ALU_ADD;
          FUNCT_SUB: fn = ALU_SUB;
          FUNCT_AND: fn = ALU_AND;
          FUNCT_OR:  fn = ALU_OR;
          FUNCT_SLT: fn = ALU_SLT;
          default:   fn = ALU_ADD;
        endcase
      end
      default: fn = ALU_ADD;
    endcase
  end

endmodule
