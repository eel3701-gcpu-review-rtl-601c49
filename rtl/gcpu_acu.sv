// gcpu_acu: the G-CPU address control unit.
//
// Groups the four address sources and the address bus mux. The program
// counter (PC) and the memory address register (MAR) are plain split U/L
// registers with increment; X and Y are index register blocks, each with a
// displacement register whose sum with the index is the block's output.
// Every register loads from the 8-bit data bus. The mux drives the 16-bit
// address bus from PC (ADDR_SEL 0), MAR (1), X block (2) or Y block (3).
//
// Interface: clk, rst, the control word from the controller (only its
// address-unit fields are used), d (data bus), addr (A15:0), and the raw
// pc/mar/x/y values for observation. Timing: registers change on the rising
// edge; addr is combinational from the registers and the select.
// All of the structure follows the block diagram.
module gcpu_acu
  import gcpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  ctrl_t ctrl,
  input  byte_t d,
  output addr_t addr,
  output addr_t pc,
  output addr_t mar,
  output addr_t x,
  output addr_t y
);

  addr_t x_ea, y_ea;

  gcpu_addr_reg u_pc (
    .clk, .rst, .ld_u(ctrl.pc_ld_u), .ld_l(ctrl.pc_ld_l), .inc(ctrl.pc_inc),
    .d, .q(pc)
  );

  gcpu_addr_reg u_mar (
    .clk, .rst, .ld_u(ctrl.mar_ld_u), .ld_l(ctrl.mar_ld_l), .inc(ctrl.mar_inc),
    .d, .q(mar)
  );

  gcpu_index_block u_x (
    .clk, .rst, .ld_u(ctrl.x_ld_u), .ld_l(ctrl.x_ld_l), .inc(ctrl.x_inc),
    .d_ld(ctrl.xd_ld), .d, .ea(x_ea), .idx(x)
  );

  gcpu_index_block u_y (
    .clk, .rst, .ld_u(ctrl.y_ld_u), .ld_l(ctrl.y_ld_l), .inc(ctrl.y_inc),
    .d_ld(ctrl.yd_ld), .d, .ea(y_ea), .idx(y)
  );

  gcpu_addr_mux u_mux (
    .sel(ctrl.addr_sel), .pc, .mar, .x_ea, .y_ea, .a(addr)
  );

endmodule
