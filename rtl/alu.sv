// alu: the one ALU of the multi-cycle CPU.
//
// It does all three jobs that need separate adders in a single-cycle
// machine: PC + 4 in the fetch state, the branch target in the decode state,
// and the instruction's own operation later. Purely combinational: result
// is a op b for the operation fn (add, subtract, and, or, signed
// set-on-less-than) and zero is high when result is 0, which BEQ uses after
// a subtraction. Add and subtract come from the design's ALUOp table; the
// logical and compare operations are the usual MIPS R-type set, chosen here.
module alu
  import mc_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_fn_e          fn,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  always_comb begin
    unique case (fn)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_SLT: result = {{(WIDTH-1){1'b0}}, $signed(a) < $signed(b)};
      default: result = a + b;
    endcase
  end

  assign zero = (result == '0);

endmodule
