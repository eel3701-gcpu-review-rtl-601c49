// gcpu: the G-CPU, a small 8-bit accumulator processor with a 16-bit
// address space.
//
// The datapath hangs off one 8-bit data bus. In a read cycle (R/-W = 1)
// memory drives the bus and any of the instruction register, the ALU
// accumulators A and B, the PC, MAR, X, Y and the two displacement
// registers can take the byte. In a write cycle (R/-W = 0) the ALU's MUXC
// output drives the bus through a tri-state buffer and memory stores it.
// The address bus A15:0 comes from the address control unit, which selects
// PC, MAR, X + Xdisp or Y + Ydisp. The controller steps each instruction
// through FETCH, DECODE and zero to four execute states.
//
// Interface (all plain signals): clk, rst (synchronous, active high),
// addr (A15:0), rw (R/-W), data_in (bus value driven by memory), data_out
// and data_oe (the CPU's side of the tri-state bus: data_oe = ~rw), and
// observation outputs for the registers, the controller state (0 FETCH,
// 1 DECODE, 2..5 execute states) and a FETCH strobe.
//
// Memory timing expected: a read returns the byte at addr in the same cycle
// (combinational read); a write is taken at the rising clock edge that ends
// a cycle with rw low. The bidirectional bus is split here into data_in,
// data_out and data_oe so that the core has no internal tri-state nets;
// an external buffer driven by data_oe recreates the shared bus. The block
// structure follows the G-CPU block diagram; the bus split, reset and the
// observation ports are this design's choices.
module gcpu
  import gcpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output logic [15:0] addr,
  output logic        rw,
  input  logic [7:0]  data_in,
  output logic [7:0]  data_out,
  output logic        data_oe,
  output logic [7:0]  reg_a,
  output logic [7:0]  reg_b,
  output logic [15:0] reg_pc,
  output logic [15:0] reg_mar,
  output logic [15:0] reg_x,
  output logic [15:0] reg_y,
  output logic [5:0]  reg_ir,
  output logic        fetch,
  output logic [2:0]  state
);

  ctrl_t      ctrl;
  byte_t      bus;
  byte_t      c_out;
  opcode_t    ir;
  logic       z, n;

  // The shared data bus: memory in a read cycle, MUXC in a write cycle.
  assign bus = ctrl.rw ? data_in : c_out;

  gcpu_ir u_ir (
    .clk, .rst, .ir_ld(ctrl.ir_ld), .d(bus[IR_W-1:0]), .q(ir)
  );

  gcpu_controller u_ctrl (
    .clk, .rst, .ir, .z, .n, .ctrl, .state
  );

  gcpu_alu u_alu (
    .clk, .rst, .msa(ctrl.msa), .msb(ctrl.msb), .msc(ctrl.msc),
    .bus_in(bus), .c_out, .reg_a, .reg_b, .z, .n
  );

  gcpu_acu u_acu (
    .clk, .rst, .ctrl, .d(bus), .addr, .pc(reg_pc), .mar(reg_mar),
    .x(reg_x), .y(reg_y)
  );

  assign rw       = ctrl.rw;
  assign data_out = c_out;
  assign data_oe  = !ctrl.rw;
  assign reg_ir   = ir;
  assign fetch    = ctrl.ir_ld;

endmodule
