// tb_alu_control: exhaustive self-checking test of the ALU control.
// Every ALUOp value with every 6-bit function code is compared with a
// table kept in the testbench.
module tb_alu_control;
  import mc_pkg::*;
  aluop_e alu_op;
  logic [5:0] funct;
  alu_fn_e fn, exp;
  int checks = 0, failures = 0;

  alu_control dut (.alu_op, .funct, .fn);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 4; op++) begin
      for (int f = 0; f < 64; f++) begin
        alu_op = aluop_e'(op); funct = f[5:0]; #1;
        if (op == 1) exp = ALU_SUB;
        else if (op == 2) begin
          case (f)
            32: exp = ALU_ADD;
            34: exp = ALU_SUB;
            36: exp = ALU_AND;
            37: exp = ALU_OR;
            42: exp = ALU_SLT;
            default: exp = ALU_ADD;
          endcase
        end else exp = ALU_ADD;
        checks++;
        if (fn !== exp) begin
          failures++; $display("ALUOp=%0d funct=%h: fn=%0d expected %0d", op, f, fn, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
