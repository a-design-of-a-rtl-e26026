// write_back: the two write-back ports of the dual-phase core ("max 2
// outputs" per instruction in the document). Phase #0 writes its destination
// unless the instruction is illegal; phase #1 writes only when it is enabled
// (not illegal, predicate true). When both phases write the same lane of the
// same register, phase #1's value is kept and phase #0's lane is dropped
// (this design's rule; the document does not order the two outputs).
//
// Interface: per phase destination register, lane mask and result; outputs
// drive the GPR file's two write ports. Thread, register number and data go
// to the ports unchanged; the logic here is the write enables and lane
// masks. Purely combinational.
module write_back
  import gpu_pkg::*;
#(
  parameter int unsigned NTHREADS = 8
) (
  input  logic                        valid,
  input  logic                        illegal,
  input  logic                        exec1,
  input  logic [$clog2(NTHREADS)-1:0] tid,
  input  logic [1:0][REGW-1:0]        dst,
  input  logic [1:0][3:0]             wmask,
  input  vec4_t [1:0]                 res,
  output logic [1:0]                  wr_en,
  output logic [1:0][$clog2(NTHREADS)-1:0] wr_tid,
  output logic [1:0][REGW-1:0]        wr_reg,
  output logic [1:0][3:0]             wr_mask,
  output vec4_t [1:0]                 wr_data
);
  always_comb begin
    logic [1:0] en;
    en[0] = valid && !illegal && (wmask[0] != '0);
    en[1] = valid && exec1    && (wmask[1] != '0);
    wr_mask[1] = wmask[1];
    wr_mask[0] = (en[1] && dst[0] == dst[1]) ? (wmask[0] & ~wmask[1]) : wmask[0];
    wr_en   = {en[1], en[0] && (wr_mask[0] != '0)};
    wr_tid  = {tid, tid};
    wr_reg  = dst;
    wr_data = res;
  end

endmodule
