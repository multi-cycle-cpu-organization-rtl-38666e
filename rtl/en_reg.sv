// en_reg: register with a write enable.
//
// The multi-cycle CPU keeps values across clock cycles in three such
// registers: the PC (written when PCWrite, or PCWriteCond with a zero ALU
// result), the instruction register (IRWrite, so the fetched instruction
// stays put while the shared memory is reused for data) and the branch
// Target register (TargetWrite). On a rising clock edge q takes d when en is
// high and holds otherwise. The synchronous, active-high reset to
// RESET_VALUE is this design's choice; the design only specifies the D, CLK,
// Q and write-enable pins.
module en_reg #(
  parameter int unsigned WIDTH       = 32,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VALUE;
    else if (en) q <= d;
  end

endmodule
