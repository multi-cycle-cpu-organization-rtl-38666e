// tb_unified_memory: self-checking test of the unified memory.
// Fills a small memory through the write port, then mixes random reads and
// writes and compares every read with a testbench copy. Also checks that
// read data is 0 while MemRead is low, that bits [1:0] of the address are
// ignored and that a write appears on the next clock edge, not before.
module tb_unified_memory;
  localparam int unsigned WORDS = 64;

  logic clk = 1'b0;
  logic [31:0] addr, wdata, rdata;
  logic mem_read, mem_write;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  unified_memory #(.WORDS(WORDS)) dut (.clk, .addr, .mem_read, .mem_write, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("%s: addr=%h rdata=%h expected %h", what, addr, rdata, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_read = 1'b0; mem_write = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      addr = i * 4; wdata = $urandom; mem_write = 1'b1;
      model[i] = wdata;
    end
    @(negedge clk); mem_write = 1'b0;
    for (int i = 0; i < WORDS; i++) begin
      addr = i * 4 + $urandom_range(0, 3); mem_read = 1'b1; #1;
      check(model[i], "sequential read");
    end
    mem_read = 1'b0; #1;
    check(32'h0, "read data without MemRead");
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      addr = $urandom_range(0, WORDS - 1) * 4;
      if ($urandom_range(0, 1) == 1) begin
        mem_read = 1'b0; mem_write = 1'b1; wdata = $urandom;
        @(posedge clk); #1;
        model[addr[31:2]] = wdata;
        mem_write = 1'b0; mem_read = 1'b1; #1;
        check(model[addr[31:2]], "read after write");
      end else begin
        mem_write = 1'b0; mem_read = 1'b1; #1;
        check(model[addr[31:2]], "random read");
      end
    end
    // a write is not visible before the clock edge
    @(negedge clk);
    addr = 32'h10; mem_read = 1'b1; mem_write = 1'b0; #1;
    wdata = ~model[4];
    check(model[4], "before write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
