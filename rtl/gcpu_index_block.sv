// gcpu_index_block: the X (or Y) register block of the G-CPU.
//
// The block holds a 16-bit index register, built from gcpu_addr_reg with
// its upper and lower bytes loaded separately and an increment strobe, and
// an 8-bit displacement register loaded from the data bus by XD_LD/YD_LD.
// Its output towards the address bus mux is index + displacement, which is
// the effective address of an indexed instruction such as LDAA dd,X.
//
// Interface: clk, rst, ld_u, ld_l, inc, d_ld, d (data bus), ea (index +
// displacement), idx (the bare index register, for observation). Timing:
// registers change on the rising edge; ea is combinational from them.
// The structure (displacement register + X register) follows the block
// diagram; treating the displacement as unsigned (zero-extended) and
// clearing it at reset are this design's choices.
module gcpu_index_block
  import gcpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ld_u,
  input  logic  ld_l,
  input  logic  inc,
  input  logic  d_ld,
  input  byte_t d,
  output addr_t ea,
  output addr_t idx
);

  byte_t disp;

  gcpu_addr_reg u_reg (
    .clk, .rst, .ld_u, .ld_l, .inc, .d, .q(idx)
  );

  always_ff @(posedge clk) begin
    if (rst)       disp <= '0;
    else if (d_ld) disp <= d;
  end

  assign ea = idx + addr_t'(disp);

endmodule
