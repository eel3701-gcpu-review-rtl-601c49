// gcpu_ir: the G-CPU instruction register (IR5:0).
//
// Holds the 6-bit opcode of the instruction being executed. On a rising
// clock edge with ir_ld high it stores the low six bits of the data bus;
// otherwise it keeps its value. The controller raises ir_ld only in the
// instruction fetch state, so the opcode stays stable through all
// decode/execute states. Six bits give room for 64 opcodes.
//
// Interface: clk, rst (synchronous, active high), ir_ld, d (data bus bits
// 5:0), q (opcode to the controller). Timing: q changes one edge after the
// fetch state. The width and load rule follow the block diagram and the
// IR description; the synchronous clear to 0 is this design's choice, since
// reset is not drawn.
module gcpu_ir
  import gcpu_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    ir_ld,
  input  opcode_t d,
  output opcode_t q
);

  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (ir_ld) q <= d;
  end

endmodule
