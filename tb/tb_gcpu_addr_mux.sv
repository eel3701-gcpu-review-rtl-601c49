// tb_gcpu_addr_mux: self-checking test of the address bus mux.
// Applies distinct random values on the four inputs and checks that each
// select code 0..3 passes PC, MAR, X block and Y block respectively.
module tb_gcpu_addr_mux;
  import gcpu_pkg::*;

  addr_sel_e sel;
  addr_t pc, mar, x_ea, y_ea, a;
  int checks = 0, failures = 0;

  gcpu_addr_mux dut (.sel, .pc, .mar, .x_ea, .y_ea, .a);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t exp;
    for (int i = 0; i < 1000; i++) begin
      pc = addr_t'($urandom); mar = addr_t'($urandom);
      x_ea = addr_t'($urandom); y_ea = addr_t'($urandom);
      sel = addr_sel_e'(i % 4);
      #1;
      exp = (i % 4 == 0) ? pc : (i % 4 == 1) ? mar : (i % 4 == 2) ? x_ea : y_ea;
      checks++;
      if (a !== exp) begin failures++; $display("sel %0d a=%h exp %h", i % 4, a, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
