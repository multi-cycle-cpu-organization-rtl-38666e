// unified_memory: the single memory that holds both instructions and data.
//
// Because the multi-cycle CPU fetches in one cycle and accesses data in a
// later one, a single memory replaces the separate instruction and data
// memories of a single-cycle machine. The array holds WORDS 32-bit words;
// the byte address is word-aligned by dropping bits [1:0] and address bits
// above the array wrap around. Reading is combinational: rdata shows the
// addressed word in the same cycle while mem_read is high, and is 0
// otherwise. Writing happens on the rising clock edge while mem_write is
// high. The size, the zero output when not reading and word-only access are
// this design's choices; the read/write strobes follow the MemRead and
// MemWrite signals of the control tables. Address bits [1:0] and those above
// the array are deliberately unused (word access, wrap-around), which is
// why a lint tool reports them as unused.
module unified_memory #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        mem_read,
  input  logic        mem_write,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;

  assign widx  = addr[AW+1:2];
  assign rdata = mem_read ? mem[widx] : '0;

  always_ff @(posedge clk) begin
    if (mem_write) mem[widx] <= wdata;
  end

  // The control unit never reads and writes in the same state.
  assert property (@(posedge clk) !(mem_read && mem_write))
    else $error("unified_memory: MemRead and MemWrite asserted together");

endmodule
