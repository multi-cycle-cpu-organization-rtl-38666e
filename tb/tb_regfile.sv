// tb_regfile: self-checking test of the register file.
// Random writes and reads on both ports against a testbench copy; checks
// that register 0 stays zero, that reset clears everything and that a
// write is seen only after the clock edge.
module tb_regfile;
  logic clk = 1'b0, rst, we;
  logic [4:0] raddr1, raddr2, waddr;
  logic [31:0] wdata, rdata1, rdata2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile #(.NREGS(32), .WIDTH(32)) dut (.clk, .rst, .raddr1, .raddr2, .we, .waddr, .wdata, .rdata1, .rdata2);

  always #5 clk = ~clk;

  task automatic check_reads();
    checks += 2;
    if (rdata1 !== model[raddr1]) begin
      failures++; $display("port1 r%0d = %h expected %h", raddr1, rdata1, model[raddr1]);
    end
    if (rdata2 !== model[raddr2]) begin
      failures++; $display("port2 r%0d = %h expected %h", raddr2, rdata2, model[raddr2]);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; waddr = '0; wdata = '0; raddr1 = '0; raddr2 = '0;
    @(posedge clk); #1; rst = 1'b0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    for (int i = 0; i < 32; i++) begin raddr1 = i; raddr2 = 31 - i; #1; check_reads(); end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1); waddr = $urandom; wdata = $urandom;
      raddr1 = waddr; raddr2 = $urandom; #1;
      check_reads();              // the old value until the edge
      @(posedge clk); #1;
      if (we && waddr != 0) model[waddr] = wdata;
      check_reads();
    end
    @(negedge clk); we = 1'b0; rst = 1'b1;
    @(posedge clk); #1; rst = 1'b0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    for (int i = 0; i < 32; i++) begin raddr1 = i; raddr2 = i; #1; check_reads(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
