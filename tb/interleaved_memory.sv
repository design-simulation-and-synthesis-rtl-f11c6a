// interleaved_memory: behavioural model of the external image memory.
//
// Behavioural model only (the real part is an off-chip memory). One-cycle
// synchronous read: data holds mem[addr] in the cycle after rd. A write port
// lets a testbench load the image. DEPTH words of 8 bits.
module interleaved_memory #(
  parameter int DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rd,
  input  logic [15:0] addr,
  output logic [7:0]  data,
  input  logic        we,
  input  logic [15:0] waddr,
  input  logic [7:0]  wdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd) data <= mem[addr];
  end
endmodule
