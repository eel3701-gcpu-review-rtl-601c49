// tb_gcpu_addr_reg: self-checking test of the split U/L address register.
// Random load-upper, load-lower and increment strobes (at most one per
// cycle, as the controller issues them) are checked against a shadow value,
// including the carry from the lower into the upper byte on increment.
module tb_gcpu_addr_reg;
  import gcpu_pkg::*;

  logic clk = 0, rst = 1, ld_u = 0, ld_l = 0, inc = 0;
  byte_t d = '0;
  addr_t q;
  int unsigned shadow;
  int checks = 0, failures = 0, carries = 0;

  gcpu_addr_reg dut (.clk, .rst, .ld_u, .ld_l, .inc, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0; shadow = 0;
    checks++; if (q !== '0) failures++;
    for (int i = 0; i < 3000; i++) begin
      int op;
      op = $urandom % 4;
      // Bias lower byte towards FF so that carries happen.
      d    = (op == 2 && $urandom % 2 == 0) ? 8'hFF : byte_t'($urandom);
      ld_u = (op == 1);
      ld_l = (op == 2);
      inc  = (op == 3);
      @(posedge clk);
      if (op == 1) shadow = (shadow % 256) + int'(d) * 256;
      if (op == 2) shadow = (shadow / 256) * 256 + int'(d);
      if (op == 3) begin
        if (shadow % 256 == 255) carries++;
        shadow = (shadow + 1) % 65536;
      end
      @(negedge clk);
      checks++;
      if (int'(q) != shadow) begin
        failures++; $display("q=%h expected %h", q, shadow);
      end
    end
    checks++;
    if (carries == 0) begin failures++; $display("no byte carry exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
