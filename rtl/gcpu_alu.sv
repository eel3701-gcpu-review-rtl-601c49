// gcpu_alu: the G-CPU ALU with its two accumulators A and B.
//
// Three muxes make up the unit. MUXA picks the next value of register A
// (hold, data bus, B, or the MUXC result) under MSA1:0; MUXB does the same
// for B under MSB1:0 (hold, data bus, A, MUXC result). MUXC is the
// combinational function unit: under MSC3:0 it forms one of 16 functions of
// A and B, and its output is both fed back to MUXA/MUXB and sent towards the
// data bus (the tri-state driver enabled by R/-W low sits in the top level).
// All register updates happen on the rising clock edge, so a full ALU
// operation takes one cycle.
//
// Flags are combinational views of register A: z is high when A == 0 and n
// when A is negative as a two's-complement number (A[7]).
//
// Interface: clk, rst (synchronous, clears A and B), msa, msb, msc, bus_in
// (data bus value), c_out (MUXC), reg_a/reg_b, z, n.
//
// From the document: the A/B/MUXA/MUXB/MUXC structure, the select widths,
// 16 functions and the flag definitions. This design's own choices: the
// meaning of each MSA/MSB code and the list of 16 functions (see gcpu_pkg).
module gcpu_alu
  import gcpu_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  msa_e    msa,
  input  msb_e    msb,
  input  alu_fn_e msc,
  input  byte_t   bus_in,
  output byte_t   c_out,
  output byte_t   reg_a,
  output byte_t   reg_b,
  output logic    z,
  output logic    n
);

  byte_t a_next, b_next;

  // MUXC: function unit.
  always_comb begin
    unique case (msc)
      ALU_PASSA: c_out = reg_a;
      ALU_PASSB: c_out = reg_b;
      ALU_ADD:   c_out = reg_a + reg_b;
      ALU_SUB:   c_out = reg_a - reg_b;
      ALU_AND:   c_out = reg_a & reg_b;
      ALU_OR:    c_out = reg_a | reg_b;
      ALU_XOR:   c_out = reg_a ^ reg_b;
      ALU_COMA:  c_out = ~reg_a;
      ALU_NEGA:  c_out = -reg_a;
      ALU_SHL:   c_out = {reg_a[6:0], 1'b0};
      ALU_SHR:   c_out = {1'b0, reg_a[7:1]};
      ALU_ASR:   c_out = {reg_a[7], reg_a[7:1]};
      ALU_ROL:   c_out = {reg_a[6:0], reg_a[7]};
      ALU_ROR:   c_out = {reg_a[0], reg_a[7:1]};
      ALU_INCA:  c_out = reg_a + 8'd1;
      ALU_DECA:  c_out = reg_a - 8'd1;
    endcase
  end

  // MUXA and MUXB.
  always_comb begin
    unique case (msa)
      MSA_HOLD: a_next = reg_a;
      MSA_BUS:  a_next = bus_in;
      MSA_B:    a_next = reg_b;
      MSA_ALU:  a_next = c_out;
    endcase
    unique case (msb)
      MSB_HOLD: b_next = reg_b;
      MSB_BUS:  b_next = bus_in;
      MSB_A:    b_next = reg_a;
      MSB_ALU:  b_next = c_out;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_a <= '0;
      reg_b <= '0;
    end else begin
      reg_a <= a_next;
      reg_b <= b_next;
    end
  end

  assign z = (reg_a == '0);
  assign n = reg_a[DATA_W-1];

endmodule
