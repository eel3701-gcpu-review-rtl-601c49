// tb_gcpu_acu: self-checking test of the address control unit.
// Each cycle it issues a random mix of load/increment strobes (at most one
// per register), displacement loads and an address select, and checks PC,
// MAR, X, Y and the address bus against shadow registers kept here.
module tb_gcpu_acu;
  import gcpu_pkg::*;

  logic clk = 0, rst = 1;
  ctrl_t ctrl = CTRL_IDLE;
  byte_t d = '0;
  addr_t addr, pc, mar, x, y;
  int unsigned s[4];       // PC, MAR, X, Y
  int unsigned sd[2];      // Xdisp, Ydisp
  int checks = 0, failures = 0;

  gcpu_acu dut (.clk, .rst, .ctrl, .d, .addr, .pc, .mar, .x, .y);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned upd(int unsigned v, int op, int unsigned b);
    case (op)
      1: return (v % 256) + b * 256;
      2: return (v / 256) * 256 + b;
      3: return (v + 1) % 65536;
      default: return v;
    endcase
  endfunction

  initial begin
    int op[4];
    int unsigned exp_addr;
    @(negedge clk); @(negedge clk);
    rst = 0;
    foreach (s[i]) s[i] = 0;
    sd[0] = 0; sd[1] = 0;
    for (int i = 0; i < 3000; i++) begin
      ctrl = CTRL_IDLE;
      d = byte_t'($urandom);
      foreach (op[r]) op[r] = $urandom % 4;
      {ctrl.pc_ld_u, ctrl.pc_ld_l, ctrl.pc_inc}    = {op[0] == 1, op[0] == 2, op[0] == 3};
      {ctrl.mar_ld_u, ctrl.mar_ld_l, ctrl.mar_inc} = {op[1] == 1, op[1] == 2, op[1] == 3};
      {ctrl.x_ld_u, ctrl.x_ld_l, ctrl.x_inc}       = {op[2] == 1, op[2] == 2, op[2] == 3};
      {ctrl.y_ld_u, ctrl.y_ld_l, ctrl.y_inc}       = {op[3] == 1, op[3] == 2, op[3] == 3};
      ctrl.xd_ld = 1'($urandom % 4 == 0);
      ctrl.yd_ld = 1'($urandom % 4 == 0);
      ctrl.addr_sel = addr_sel_e'($urandom % 4);
      #1;
      case (int'(ctrl.addr_sel))
        0: exp_addr = s[0];
        1: exp_addr = s[1];
        2: exp_addr = (s[2] + sd[0]) % 65536;
        default: exp_addr = (s[3] + sd[1]) % 65536;
      endcase
      checks++;
      if (int'(addr) != exp_addr) begin
        failures++; $display("addr sel %0d = %h expected %h", ctrl.addr_sel, addr, exp_addr);
      end
      @(posedge clk);
      foreach (s[r]) s[r] = upd(s[r], op[r], int'(d));
      if (ctrl.xd_ld) sd[0] = int'(d);
      if (ctrl.yd_ld) sd[1] = int'(d);
      @(negedge clk);
      checks++;
      if (int'(pc) != s[0] || int'(mar) != s[1] || int'(x) != s[2] || int'(y) != s[3]) begin
        failures++;
        $display("pc %h mar %h x %h y %h expected %h %h %h %h", pc, mar, x, y, s[0], s[1], s[2], s[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
