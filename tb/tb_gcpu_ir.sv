// tb_gcpu_ir: self-checking test of the instruction register.
// Drives random data and load strobes and compares the register against a
// shadow copy kept by the testbench: the value must change only on a clock
// edge with ir_ld high, and reset must clear it.
module tb_gcpu_ir;
  import gcpu_pkg::*;

  logic clk = 0, rst = 1, ir_ld = 0;
  opcode_t d = '0, q, shadow;
  int checks = 0, failures = 0;

  gcpu_ir dut (.clk, .rst, .ir_ld, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0; shadow = '0;
    checks++; if (q !== '0) begin failures++; $display("reset value %h", q); end
    for (int i = 0; i < 500; i++) begin
      ir_ld = 1'($urandom % 3 == 0);
      d     = opcode_t'($urandom);
      @(posedge clk);
      if (ir_ld) shadow = d;
      @(negedge clk);
      checks++;
      if (q !== shadow) begin
        failures++; $display("cycle %0d: q=%h expected %h", i, q, shadow);
      end
    end
    rst = 1; @(negedge clk); rst = 0;
    checks++; if (q !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
