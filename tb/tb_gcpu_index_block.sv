// tb_gcpu_index_block: self-checking test of the X/Y register block.
// Randomly loads the index bytes and the displacement and increments the
// index, and checks both the bare index and the output index + displacement
// (16-bit, wrapping) against shadow values.
module tb_gcpu_index_block;
  import gcpu_pkg::*;

  logic clk = 0, rst = 1, ld_u = 0, ld_l = 0, inc = 0, d_ld = 0;
  byte_t d = '0;
  addr_t ea, idx;
  int unsigned s_idx, s_disp;
  int checks = 0, failures = 0;

  gcpu_index_block dut (.clk, .rst, .ld_u, .ld_l, .inc, .d_ld, .d, .ea, .idx);

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
    rst = 0; s_idx = 0; s_disp = 0;
    for (int i = 0; i < 3000; i++) begin
      int op;
      op = $urandom % 5;
      d    = byte_t'($urandom);
      ld_u = (op == 1);
      ld_l = (op == 2);
      inc  = (op == 3);
      d_ld = (op == 4);
      @(posedge clk);
      case (op)
        1: s_idx = (s_idx % 256) + int'(d) * 256;
        2: s_idx = (s_idx / 256) * 256 + int'(d);
        3: s_idx = (s_idx + 1) % 65536;
        4: s_disp = int'(d);
        default: ;
      endcase
      @(negedge clk);
      checks++;
      if (int'(idx) != s_idx || int'(ea) != (s_idx + s_disp) % 65536) begin
        failures++; $display("idx=%h ea=%h expected %h %h", idx, ea, s_idx, (s_idx + s_disp) % 65536);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
