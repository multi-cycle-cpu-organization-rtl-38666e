// tb_control_fsm: self-checking test of the control unit.
// For each instruction class (and an unsupported opcode) it resets the FSM,
// holds the opcode and follows the machine through one instruction. It
// checks the state sequence, the number of cycles (BEQ and J 3, R-type and
// SW 4, LW 5, unknown 2) and every control signal in every state against a
// table written out in the testbench from the state diagram.
module tb_control_fsm;
  import mc_pkg::*;

  logic clk = 1'b0, rst;
  logic [5:0] opcode;
  ctrl_t ctrl;
  state_e state;
  int checks = 0, failures = 0;

  control_fsm dut (.clk, .rst, .opcode, .ctrl, .state);

  always #5 clk = ~clk;

  // Expected controls, one string of fields per state:
  // {MemRead, MemWrite, IorD, IRWrite, RegDst, RegWrite, MemtoReg, ALUSelA,
  //  ALUSelB[1:0], ALUOp[1:0], PCWrite, PCWriteCond, PCSource[1:0], TargetWrite}
  function automatic logic [16:0] expected(int s);
    case (s)
      0: return 17'b1_0_0_1_0_0_0_0_01_00_1_0_00_0;
      1: return 17'b0_0_0_0_0_0_0_0_11_00_0_0_00_1;
      2: return 17'b0_0_1_0_0_0_0_1_10_00_0_0_00_0;
      3: return 17'b1_0_1_0_0_0_0_1_10_00_0_0_00_0;
      4: return 17'b1_0_1_0_0_1_1_1_10_00_0_0_00_0;
      5: return 17'b0_1_1_0_0_0_0_1_10_00_0_0_00_0;
      6: return 17'b0_0_0_0_0_0_0_1_00_10_0_0_00_0;
      7: return 17'b0_0_0_0_1_1_0_1_00_10_0_0_00_0;
      8: return 17'b0_0_0_0_0_0_0_1_00_01_0_1_01_0;
      9: return 17'b0_0_0_0_0_0_0_0_00_00_1_0_10_0;
      default: return 'x;
    endcase
  endfunction

  task automatic run(input logic [5:0] op, input int seq[$], input string name);
    int cycles;
    @(negedge clk); rst = 1'b1; opcode = op;
    @(negedge clk); rst = 1'b0;
    cycles = 0;
    foreach (seq[i]) begin
      checks++;
      if (int'(state) != seq[i]) begin
        failures++; $display("%s step %0d: state %0d expected %0d", name, i, state, seq[i]);
      end
      checks++;
      if (ctrl !== expected(int'(state))) begin
        failures++; $display("%s state %0d: ctrl=%b expected %b", name, state, ctrl, expected(int'(state)));
      end
      cycles++;
      @(negedge clk);
    end
    checks++;
    if (state != S_FETCH || cycles != seq.size()) begin
      failures++; $display("%s: did not return to fetch after %0d cycles", name, cycles);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; opcode = '0;
    run(6'h23, '{0, 1, 2, 3, 4}, "LW");
    run(6'h2B, '{0, 1, 2, 5}, "SW");
    run(6'h00, '{0, 1, 6, 7}, "R-type");
    run(6'h04, '{0, 1, 8}, "BEQ");
    run(6'h02, '{0, 1, 9}, "J");
    run(6'h3F, '{0, 1}, "unknown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
