// data_mem_model: behavioural model of the external data memory the core's
// phase #1 loads and stores reach. One 4-lane vector per address; a store
// writes the lanes of its mask; a load answers on the next clock edge.
// Contents start at zero. Not part of the design; testbench use only.
module data_mem_model
  import gpu_pkg::*;
#(
  parameter int unsigned DAW = 10
) (
  input  logic           clk,
  input  logic           req,
  input  logic           we,
  input  logic [DAW-1:0] addr,
  input  vec4_t          wdata,
  input  logic [3:0]     wmask,
  output vec4_t          rdata
);
  vec4_t mem [2**DAW];
  initial begin
    for (int i = 0; i < 2**DAW; i++) mem[i] = '0;
    rdata = '0;
  end
  always @(posedge clk) begin
    if (req && we)
      for (int c = 0; c < 4; c++) if (wmask[c]) mem[addr][c] <= wdata[c];
    if (req && !we) rdata <= mem[addr];
  end
endmodule
