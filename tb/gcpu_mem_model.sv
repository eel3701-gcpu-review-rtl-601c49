// gcpu_mem_model: behavioural model of the memory on the G-CPU buses
// (testbench only; not synthesizable design content).
//
// A flat 64 KiB byte array. Reads are combinational: rdata shows the byte
// at addr in the same cycle. A write stores wdata at addr on the rising
// clock edge when we is high (the CPU's R/-W low). Testbenches preload and
// inspect the array `mem` directly.
module gcpu_mem_model (
  input  logic        clk,
  input  logic [15:0] addr,
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata
);

  logic [7:0] mem [0:65535];

  assign rdata = mem[addr];

  always @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

endmodule
