// tb_en_reg: self-checking test of the write-enabled register.
// Drives random data with a random enable and reset for 500 cycles and
// compares q after every edge with a value kept in the testbench: reset
// gives RESET_VALUE, enable loads d, otherwise q holds.
module tb_en_reg;
  localparam int unsigned W = 32;
  localparam logic [W-1:0] RV = 32'hDEAD_0004;

  logic clk = 1'b0, rst, en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  en_reg #(.WIDTH(W), .RESET_VALUE(RV)) dut (.clk, .rst, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; d = '0;
    @(posedge clk); #1;
    model = RV;
    checks++; if (q !== model) begin failures++; $display("reset: q=%h", q); end
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      en  = ($urandom_range(0, 2) != 0);
      rst = ($urandom_range(0, 30) == 0);
      d   = $urandom;
      @(posedge clk); #1;
      if (rst) model = RV; else if (en) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("cycle %0d: en=%b rst=%b q=%h expected %h", i, en, rst, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
