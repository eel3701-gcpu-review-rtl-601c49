// gcpu_addr_reg: one 16-bit address source register of the G-CPU
// (used for the program counter and the memory address register, and as the
// base register inside the X and Y register blocks).
//
// Because the data bus is 8 bits and addresses are 16, the register is a
// pair of 8-bit halves, upper (U/H) and lower (L), each loaded from the data
// bus on its own strobe. An increment input adds one to the full 16-bit
// value. All changes take effect on the rising clock edge.
//
// Interface: clk, rst (synchronous, clears to 0), ld_u, ld_l, inc, d (data
// bus), q (16-bit address). If inc and a load are both high the loads win;
// loading U and L in one cycle writes the same byte into both halves. The
// controller never does either. The split U/L structure and the INC and LD
// strobes follow the document; priority and reset value are this design's
// choices.
module gcpu_addr_reg
  import gcpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ld_u,
  input  logic  ld_l,
  input  logic  inc,
  input  byte_t d,
  output addr_t q
);

  always_ff @(posedge clk) begin
    if (rst) begin
      q <= '0;
    end else if (ld_u || ld_l) begin
      if (ld_u) q[15:8] <= d;
      if (ld_l) q[7:0]  <= d;
    end else if (inc) begin
      q <= q + addr_t'(1);
    end
  end

endmodule
