// tb_alu: self-checking test of the ALU.
// Applies corner and random operands to every operation and compares the
// result and the Zero flag with values computed in the testbench.
module tb_alu;
  import mc_pkg::*;
  logic [31:0] a, b, result, exp;
  alu_fn_e fn;
  logic zero;
  int checks = 0, failures = 0;

  alu #(.WIDTH(32)) dut (.a, .b, .fn, .result, .zero);

  function automatic logic [31:0] ref_op(alu_fn_e f, logic [31:0] x, logic [31:0] y);
    case (f)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_SLT: begin
        // signed compare written out on sign bits
        if (x[31] != y[31]) return {31'b0, x[31]};
        return {31'b0, x < y};
      end
      default: return 'x;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h4};
    static alu_fn_e fns [5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_SLT};
    foreach (fns[k]) begin
      foreach (corners[i]) foreach (corners[j]) begin
        a = corners[i]; b = corners[j]; fn = fns[k]; #1;
        exp = ref_op(fn, a, b);
        checks++;
        if (result !== exp || zero !== (exp == 0)) begin
          failures++; $display("fn=%s a=%h b=%h result=%h zero=%b expected %h", fn.name(), a, b, result, zero, exp);
        end
      end
      for (int n = 0; n < 500; n++) begin
        a = $urandom; b = (n % 7 == 0) ? a : $urandom; fn = fns[k]; #1;
        exp = ref_op(fn, a, b);
        checks++;
        if (result !== exp || zero !== (exp == 0)) begin
          failures++; $display("fn=%s a=%h b=%h result=%h zero=%b expected %h", fn.name(), a, b, result, zero, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
