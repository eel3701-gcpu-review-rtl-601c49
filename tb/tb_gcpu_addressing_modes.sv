// tb_gcpu_addressing_modes: checks the effective address of each addressing
// mode on the processor's address bus, using the classic example
// instructions (LDX #$3701, LDAA #$37, LDX $1000, LDAA $FF, LDAA 0,X,
// STAB 3,Y, SUM_BA, BEQ $08).
//
// The effective address (EA) is the address from which data is fetched or
// to which it is sent:
//   immediate: address of the opcode + 1
//   extended:  the address in the instruction
//   indexed:   X or Y + displacement
//   inherent and branch (absolute): none (no data moved)
// For every instruction the testbench records the address bus in the first
// cycle that moves data into A, B, X or Y or writes memory, and compares
// it with the EA worked out by hand for the program below. It also checks
// each instruction's cycle count and the branch outcome (PC_L replaced,
// PC_H kept).
module tb_gcpu_addressing_modes;
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

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    string       name;
    int unsigned at;      // address of the opcode
    int          ea;      // expected EA, -1 for none
    int          cycles;
  } item_t;

  initial begin
    static item_t items[] = '{
      '{"LDY #$3000", 16'h0100, 16'h0101, 4},
      '{"LDX #$3701", 16'h0103, 16'h0104, 4},
      '{"LDAA #$37",  16'h0106, 16'h0107, 3},
      '{"LDX $1000",  16'h0108, 16'h1000, 6},
      '{"LDAA $FF",   16'h010B, 16'h00FF, 5},
      '{"LDAA 0,X",   16'h010E, 16'h4020, 4},
      '{"STAB 3,Y",   16'h0110, 16'h3003, 4},
      '{"SUM_BA",     16'h0112, -1,       2},
      '{"BEQ $08",    16'h0113, -1,       3},   // A = 5: not taken
      '{"LDAA #0",    16'h0115, 16'h0116, 3},
      '{"BEQ $08",    16'h0117, -1,       3}    // taken: PC = $0108
    };
    static byte unsigned prog[] = '{
      8'h09, 8'h00, 8'h30,  8'h08, 8'h01, 8'h37,  8'h02, 8'h37,
      8'h0A, 8'h00, 8'h10,  8'h04, 8'hFF, 8'h00,  8'h0C, 8'h00,
      8'h13, 8'h03,  8'h22,  8'h18, 8'h08,  8'h02, 8'h00,  8'h18, 8'h08
    };
    int first_ea, cyc, k;

    for (int a = 0; a < 65536; a++) u_mem.mem[a] = 8'h00;
    // Branches cannot leave their page, so the program at $0100 is reached
    // from reset by running 256 no-operation opcodes ($3F) from $0000.
    for (int a = 0; a < 256; a++) u_mem.mem[a] = 8'h3F;
    foreach (prog[i]) u_mem.mem[16'h0100 + i] = prog[i];
    u_mem.mem[16'h1000] = 8'h20;
    u_mem.mem[16'h1001] = 8'h40;
    u_mem.mem[16'h00FF] = 8'h3F;
    u_mem.mem[16'h4020] = 8'h05;
    u_mem.mem[16'h3003] = 8'hAA;   // STAB 3,Y overwrites it with B = 0

    repeat (2) @(negedge clk);
    rst = 0;
    // Skip the no-operation slide.
    while (!(fetch && reg_pc == 16'h0100)) @(negedge clk);

    k = 0;
    while (k < items.size()) begin
      // Now in FETCH of items[k].
      checks++;
      if (int'(reg_pc) != items[k].at) begin
        failures++; $display("%s: fetched at %h, expected %h", items[k].name, reg_pc, items[k].at);
      end
      first_ea = -1; cyc = 0;
      do begin
        if (first_ea < 0 && (!rw || dut.ctrl.msa == MSA_BUS || dut.ctrl.msb == MSB_BUS ||
                             dut.ctrl.x_ld_l || dut.ctrl.y_ld_l))
          first_ea = int'(addr);
        @(negedge clk);
        cyc++;
      end while (!fetch);
      checks++;
      if (first_ea != items[k].ea) begin
        failures++; $display("%s: EA %h, expected %h", items[k].name, first_ea, items[k].ea);
      end
      checks++;
      if (cyc != items[k].cycles) begin
        failures++; $display("%s: %0d cycles, expected %0d", items[k].name, cyc, items[k].cycles);
      end
      k++;
    end
    checks++;
    if (reg_pc != 16'h0108 || reg_x != 16'h4020 || reg_a != 8'h00 || u_mem.mem[16'h3003] != 8'h00) begin
      failures++; $display("final PC=%h X=%h A=%h", reg_pc, reg_x, reg_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
