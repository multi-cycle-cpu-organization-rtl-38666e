// regfile: the CPU's general-purpose register file.
//
// NREGS registers of WIDTH bits with two combinational read ports (rs and rt
// of the instruction register) and one write port. A write takes effect on
// the rising clock edge when we is high; a read in the same cycle still sees
// the old value. Register 0 always reads as zero and ignores writes, and a
// synchronous reset clears every register: both are this design's choices
// (the MIPS convention and a clean start), not part of the datapath figures.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    raddr1,
  input  logic [AW-1:0]    raddr2,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata1,
  output logic [WIDTH-1:0] rdata2
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];
  assign rdata2 = (raddr2 == '0) ? '0 : regs[raddr2];

endmodule
