// gpr_file: the single unified register group of the core. Each hardware
// thread owns NREGS 4-lane registers; both phases read and write the same
// registers, which is how the document replaces the many register groups of
// the shader API (input, temporary, constant, address, loop, predicate ...)
// by one GPR group.
//
// Ports: four combinational read ports (two per phase, one per fragment
// source), two write ports with per-lane write masks (phase #0 and phase #1
// write-back; port 1 wins on a lane both write), and a host port used to load
// inputs and read results while threads are stopped (host write wins over
// both). The register count and the host port are this design's choice.
// Timing: reads are combinational, writes take effect at the clock edge.
module gpr_file
  import gpu_pkg::*;
#(
  parameter int unsigned NTHREADS = 8
) (
  input  logic                        clk,
  // read ports
  input  logic [3:0][$clog2(NTHREADS)-1:0] rd_tid,
  input  logic [3:0][REGW-1:0]        rd_reg,
  output vec4_t [3:0]                 rd_data,
  // write ports
  input  logic [1:0]                  wr_en,
  input  logic [1:0][$clog2(NTHREADS)-1:0] wr_tid,
  input  logic [1:0][REGW-1:0]        wr_reg,
  input  logic [1:0][3:0]             wr_mask,
  input  vec4_t [1:0]                 wr_data,
  // host port
  input  logic                        host_we,
  input  logic [$clog2(NTHREADS)-1:0] host_tid,
  input  logic [REGW-1:0]             host_reg,
  input  vec4_t                       host_wdata,
  output vec4_t                       host_rdata
);
  localparam int unsigned TW = $clog2(NTHREADS);
  localparam int unsigned AW = TW + REGW;

  vec4_t regs [NTHREADS*NREGS];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      if (wr_en[p])
        for (int c = 0; c < 4; c++)
          if (wr_mask[p][c]) regs[{wr_tid[p], wr_reg[p]}][c] <= wr_data[p][c];
    if (host_we) regs[{host_tid, host_reg}] <= host_wdata;
  end

  always_comb begin
    for (int i = 0; i < 4; i++) rd_data[i] = regs[AW'({rd_tid[i], rd_reg[i]})];
    host_rdata = regs[AW'({host_tid, host_reg})];
  end

endmodule
