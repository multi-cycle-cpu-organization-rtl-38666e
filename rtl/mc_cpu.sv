// mc_cpu: top level of the multi-cycle CPU.
//
// Connects the control unit (a ten-state Moore FSM) to the shared datapath.
// The control unit sees only the opcode field of the instruction register
// and drives every write enable and multiplexer select of the datapath; the
// datapath's Zero flag is used inside the datapath to qualify PCWriteCond.
// Each instruction takes 3 (BEQ, J), 4 (R-type, SW) or 5 (LW) clock cycles.
//
// The program lives in the unified memory inside the datapath
// (u_dp.u_mem.mem, one 32-bit word per entry) and must be loaded before
// reset is released. rst is synchronous and active high; it sends the
// control unit to the fetch state and clears the PC, IR, Target register and
// register file. The remaining outputs only expose internal signals so the
// machine can be observed from outside; they are this design's addition.
module mc_cpu
  import mc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output logic [3:0]  state,
  output logic        mem_write,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        reg_write,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata
);

  ctrl_t      ctrl;
  state_e     state_e_q;
  logic [5:0] opcode;

  control_fsm u_ctrl (
    .clk, .rst,
    .opcode (opcode),
    .ctrl   (ctrl),
    .state  (state_e_q)
  );

  mc_datapath #(.MEM_WORDS(MEM_WORDS)) u_dp (
    .clk, .rst,
    .ctrl      (ctrl),
    .opcode    (opcode),
    .pc        (pc),
    .ir        (ir),
    .zero      (),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .rf_waddr  (reg_waddr),
    .rf_wdata  (reg_wdata)
  );

  assign state     = state_e_q;
  assign mem_write = ctrl.mem_write;
  assign reg_write = ctrl.reg_write;

endmodule
