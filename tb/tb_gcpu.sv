// tb_gcpu: end-to-end test of the G-CPU with a behavioural memory.
//
// An instruction-level reference model of the G-CPU, written here from the
// instruction descriptions (register transfers and the cycle count of each
// addressing mode), runs alongside the processor. Whenever the processor
// enters its FETCH state the testbench compares A, B, X, Y and PC with the
// model and the cycles spent on the previous instruction with the model's
// count, then steps the model by one instruction. At the end it compares
// every memory byte.
//
// Phase 1 runs a directed program: it sums the six-byte table
// DATA DC.B 1,2,3,4,5,6 at $1FF0 with an indexed load in a loop closed by
// BEQ/BP, then uses LDX #$1370, LDAA #$37, a 16-bit extended LDX, STAB 3,Y
// and indexed store/load, and halts in a BEQ-to-itself loop; the results
// are also checked against hand-computed values. Phase 2 runs random
// instruction streams (all opcodes, random operands). The testbench counts
// each mechanism (every addressing mode, taken and untaken branches, write
// cycles, MAR increment, a PC increment that carries into PC_H, every ALU
// function) and counts a failure for any that never happened.
module tb_gcpu;
  import gcpu_pkg::*;

  logic clk = 0, rst = 1;
  logic [15:0] addr, reg_pc, reg_mar, reg_x, reg_y;
  logic rw, data_oe, fetch;
  logic [7:0] data_in, data_out, reg_a, reg_b;
  logic [5:0] reg_ir;
  logic [2:0] state;
  int checks = 0, failures = 0;

  gcpu dut (
    .clk, .rst, .addr, .rw, .data_in, .data_out, .data_oe,
    .reg_a, .reg_b, .reg_pc, .reg_mar, .reg_x, .reg_y, .reg_ir, .fetch, .state
  );

  gcpu_mem_model u_mem (
    .clk, .addr, .we(data_oe), .wdata(data_out), .rdata(data_in)
  );

  always #5 clk = ~clk;

  localparam int MAX_CYCLES = 200000;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  logic [7:0] m [0:65535];
  int unsigned ma, mb, mx, my, mpc;

  // Mechanism counters.
  int n_inh, n_imm, n_ext, n_idx, n_br_taken, n_br_not, n_wr, n_marinc, n_pccarry;
  int n_fn [16];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("[%0d] %s", cycle, what);
    end
  endtask

  function automatic int unsigned alu(int unsigned f, int unsigned a, int unsigned b);
    case (f)
      2:  return (a + b) & 255;
      3:  return (a - b) & 255;
      4:  return a & b;
      5:  return a | b;
      6:  return a ^ b;
      7:  return ~a & 255;
      8:  return (0 - a) & 255;
      9:  return (a << 1) & 255;
      10: return a >> 1;
      11: return (a >> 1) | (a & 128);
      12: return ((a << 1) | (a >> 7)) & 255;
      13: return ((a >> 1) | (a << 7)) & 255;
      14: return (a + 1) & 255;
      15: return (a - 1) & 255;
      default: return a;
    endcase
  endfunction

  function automatic int unsigned rd(int unsigned a);
    return int'(m[a & 16'hFFFF]);
  endfunction

  // Executes one instruction on the model; returns its cycle count.
  function automatic int step();
    int unsigned op, p1, p2, ea, lo;
    op = rd(mpc) & 63;
    p1 = rd(mpc + 1);
    p2 = rd(mpc + 2);
    if (op <= 1 || op == 6'h14 || op == 6'h15 || (op >= 6'h22 && op <= 6'h2F)) begin
      case (op)
        0: mb = ma;
        1: ma = mb;
        6'h14: mx = (mx + 1) & 16'hFFFF;
        6'h15: my = (my + 1) & 16'hFFFF;
        default: ma = alu(op & 15, ma, mb);
      endcase
      mpc = (mpc + 1) & 16'hFFFF;
      return 2;
    end
    if (op == 2 || op == 3) begin
      if (op == 2) ma = p1; else mb = p1;
      mpc = (mpc + 2) & 16'hFFFF;
      return 3;
    end
    if (op == 8 || op == 9) begin
      if (op == 8) mx = p1 | (p2 << 8); else my = p1 | (p2 << 8);
      mpc = (mpc + 3) & 16'hFFFF;
      return 4;
    end
    if (op >= 4 && op <= 7) begin
      ea = p1 | (p2 << 8);
      case (op)
        4: ma = rd(ea);
        5: mb = rd(ea);
        6: m[ea] = 8'(ma);
        default: m[ea] = 8'(mb);
      endcase
      mpc = (mpc + 3) & 16'hFFFF;
      return 5;
    end
    if (op == 10 || op == 11) begin
      ea = p1 | (p2 << 8);
      lo = rd(ea);
      if (op == 10) mx = lo | (rd(ea + 1) << 8); else my = lo | (rd(ea + 1) << 8);
      mpc = (mpc + 3) & 16'hFFFF;
      return 6;
    end
    if (op >= 6'h0C && op <= 6'h13) begin
      ea = (((op & 1) ? my : mx) + p1) & 16'hFFFF;
      case (op & 6'h12)
        6'h00: ma = rd(ea);
        6'h02: mb = rd(ea);
        6'h10: m[ea] = 8'(ma);
        default: m[ea] = 8'(mb);
      endcase
      mpc = (mpc + 2) & 16'hFFFF;
      return 4;
    end
    if (op == 6'h18 || op == 6'h19) begin
      bit t;
      t = (op == 6'h18) ? (ma == 0) : (ma < 128);
      if (t) mpc = ((mpc + 1) & 16'hFF00) | p1;
      else   mpc = (mpc + 2) & 16'hFFFF;
      return 3;
    end
    mpc = (mpc + 1) & 16'hFFFF;   // unused opcode: no operation
    return 2;
  endfunction

  // Count mechanisms from the processor's own control word.
  always @(posedge clk) if (!rst) begin
    if (dut.ctrl.rw == 0) n_wr++;
    if (dut.ctrl.mar_inc) n_marinc++;
    if (dut.ctrl.pc_inc && reg_pc[7:0] == 8'hFF) n_pccarry++;
    if (dut.state == 2 && (dut.ir == 6'h18 || dut.ir == 6'h19)) begin
      if (dut.ctrl.pc_ld_l) n_br_taken++; else n_br_not++;
    end
    if (dut.state == 1) begin
      if (dut.ir <= 1 || dut.ir == 6'h14 || dut.ir == 6'h15 || (dut.ir >= 6'h22 && dut.ir <= 6'h2F)) n_inh++;
      if (dut.ir >= 2 && dut.ir <= 3 || dut.ir == 8 || dut.ir == 9) n_imm++;
      if (dut.ir >= 4 && dut.ir <= 7 || dut.ir == 10 || dut.ir == 11) n_ext++;
      if (dut.ir >= 6'h0C && dut.ir <= 6'h13) n_idx++;
      if (dut.ir >= 6'h22 && dut.ir <= 6'h2F) n_fn[dut.ir & 15]++;
    end
  end

  // Run `ninstr` instructions in lock step with the model.
  task automatic run(int ninstr);
    int last_fetch, exp_cyc;
    rst = 1;
    ma = 0; mb = 0; mx = 0; my = 0; mpc = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    last_fetch = -1; exp_cyc = 0;
    for (int i = 0; i <= ninstr; ) begin
      #1;
      if (fetch) begin
        check(int'(reg_a) == ma && int'(reg_b) == mb && int'(reg_x) == mx &&
              int'(reg_y) == my && int'(reg_pc) == mpc,
              $sformatf("instr %0d: A=%h B=%h X=%h Y=%h PC=%h, model %h %h %h %h %h",
                        i, reg_a, reg_b, reg_x, reg_y, reg_pc, ma, mb, mx, my, mpc));
        if (last_fetch >= 0)
          check(cycle - last_fetch == exp_cyc,
                $sformatf("instr %0d took %0d cycles, expected %0d", i, cycle - last_fetch, exp_cyc));
        last_fetch = cycle;
        exp_cyc = step();
        i++;
      end
      @(negedge clk);
    end
    for (int a = 0; a < 65536; a++)
      if (u_mem.mem[a] != m[a]) begin
        check(0, $sformatf("memory %h = %h, model %h", a, u_mem.mem[a], m[a]));
        break;
      end
    checks++;
  endtask

  task automatic load(int a, byte unsigned v);
    m[a] = v;
    u_mem.mem[a] = v;
  endtask

  initial begin
    static byte unsigned prog[] = '{
      8'h08, 8'h70, 8'h13,   // 0000 LDX  #$1370
      8'h09, 8'hF0, 8'h1F,   // 0003 LDY  #$1FF0
      8'h02, 8'h00,          // 0006 LDAA #0
      8'h06, 8'h00, 8'h20,   // 0008 STAA $2000   SUM
      8'h02, 8'h06,          // 000B LDAA #6
      8'h06, 8'h01, 8'h20,   // 000D STAA $2001   COUNT
      8'h04, 8'h00, 8'h20,   // 0010 LOOP LDAA $2000
      8'h0F, 8'h00,          // 0013 LDAB 0,Y
      8'h22,                 // 0015 SUM_BA
      8'h06, 8'h00, 8'h20,   // 0016 STAA $2000
      8'h15,                 // 0019 INY
      8'h04, 8'h01, 8'h20,   // 001A LDAA $2001
      8'h2F,                 // 001D DEC_A
      8'h06, 8'h01, 8'h20,   // 001E STAA $2001
      8'h18, 8'h25,          // 0021 BEQ DONE
      8'h19, 8'h10,          // 0023 BP  LOOP
      8'h04, 8'h00, 8'h20,   // 0025 DONE LDAA $2000
      8'h29,                 // 0028 SHFA_L
      8'h00,                 // 0029 TAB
      8'h02, 8'h37,          // 002A LDAA #$37
      8'h0A, 8'h00, 8'h10,   // 002C LDX  $1000
      8'h13, 8'h03,          // 002F STAB 3,Y
      8'h10, 8'h05,          // 0031 STAA 5,X
      8'h0C, 8'h05,          // 0033 LDAA 5,X
      8'h02, 8'h00,          // 0035 LDAA #0
      8'h18, 8'h37           // 0037 HALT BEQ HALT
    };

    // ---- phase 1: directed program
    for (int a = 0; a < 65536; a++) load(a, 8'h00);
    foreach (prog[i]) load(i, prog[i]);
    for (int i = 0; i < 6; i++) load(16'h1FF0 + i, byte'(i + 1));
    load(16'h1000, 8'h34);
    load(16'h1001, 8'h12);
    run(100);
    check(u_mem.mem[16'h2000] == 8'd21, "table sum");
    check(u_mem.mem[16'h2001] == 8'd0,  "loop counter");
    check(u_mem.mem[16'h1FF9] == 8'd42, $sformatf("STAB 3,Y: %h Y=%h", u_mem.mem[16'h1FF9], reg_y));
    check(u_mem.mem[16'h1239] == 8'h37, "STAA 5,X");
    check(reg_x == 16'h1234 && reg_y == 16'h1FF6, "index registers");
    check(reg_b == 8'd42 && reg_a == 8'd0 && reg_pc == 16'h0037, "final A, B, PC");

    // ---- phase 2: random instruction streams
    for (int p = 0; p < 4; p++) begin
      for (int a = 0; a < 65536; a++) load(a, byte'($urandom));
      // Put one program near the end of a page so PC carries into PC_H.
      if (p == 0) for (int a = 0; a < 256; a++) load(a, 8'h2E);  // INC_A slide
      run(3000);
    end

    check(n_inh > 0,      "inherent instructions ran");
    check(n_imm > 0,      "immediate instructions ran");
    check(n_ext > 0,      "extended instructions ran");
    check(n_idx > 0,      "indexed instructions ran");
    check(n_br_taken > 0, "branch taken");
    check(n_br_not > 0,   "branch not taken");
    check(n_wr > 0,       "write cycles");
    check(n_marinc > 0,   "MAR increment (16-bit extended load)");
    check(n_pccarry > 0,  "PC increment carrying into PC_H");
    for (int f = 2; f < 16; f++) check(n_fn[f] > 0, $sformatf("ALU function %0d", f));
    $display("mechanisms: inherent=%0d immediate=%0d extended=%0d indexed=%0d taken=%0d not_taken=%0d writes=%0d mar_inc=%0d pc_carry=%0d",
             n_inh, n_imm, n_ext, n_idx, n_br_taken, n_br_not, n_wr, n_marinc, n_pccarry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
