// gcpu_addr_mux: the G-CPU address bus mux.
//
// Chooses which of the four address sources drives A15:0: input 0 the
// program counter, 1 the memory address register, 2 the X register block
// (X + displacement) and 3 the Y register block, selected by ADDR_SEL1:0
// exactly as numbered on the block diagram. Purely combinational.
module gcpu_addr_mux
  import gcpu_pkg::*;
(
  input  addr_sel_e sel,
  input  addr_t     pc,
  input  addr_t     mar,
  input  addr_t     x_ea,
  input  addr_t     y_ea,
  output addr_t     a
);

  always_comb begin
    unique case (sel)
      ASEL_PC:  a = pc;
      ASEL_MAR: a = mar;
      ASEL_X:   a = x_ea;
      ASEL_Y:   a = y_ea;
    endcase
  end

endmodule
