// operand_fetch: operand fetch of one phase. It drives the phase's two GPR
// read ports (one per fragment slot), applies each source's swizzle and
// negation, and evaluates the coordinate fragments found in the phase.
//
// The core has two instances, one per phase, as in the document's dual-phase
// pipeline; phase #0's coordination output feeds phase #1's operand fetch.
// Coordination (this design's concrete form of the document's "coordinate"
// path): ADDR takes the integer part of lane x of its swizzled source as an
// address; PRED tests lane x of its swizzled source against the condition in
// its destination field and gives phase #1's predicate. A source marked
// "indexed" reads register (src + index_in) mod NREGS, the relative access
// "B[D.w]" of the document's examples.
//
// Interface: ph = decoded phase; tid = thread; rd_reg/rd_data = GPR ports;
// val = swizzled source of each slot; addr/pred outputs for phase #1.
// Purely combinational.
module operand_fetch
  import gpu_pkg::*;
#(
  parameter int unsigned NTHREADS = 8
) (
  input  phase_t                      ph,
  input  logic [$clog2(NTHREADS)-1:0] tid,
  input  logic                        index_en,
  input  logic [PCW-1:0]              index_in,
  output logic [1:0][$clog2(NTHREADS)-1:0] rd_tid,
  output logic [1:0][REGW-1:0]        rd_reg,
  input  vec4_t [1:0]                 rd_data,
  output vec4_t [1:0]                 val,
  output logic                        addr_en,
  output logic [PCW-1:0]              addr,
  output logic                        pred_en,
  output logic                        pred_ok
);
  always_comb begin
    addr_en = 1'b0;
    addr    = '0;
    pred_en = 1'b0;
    pred_ok = 1'b1;
    for (int k = 0; k < 2; k++) begin
      rd_tid[k] = tid;
      rd_reg[k] = ph.s[k].src.r;
      if (ph.s[k].src.idx && index_en)
        rd_reg[k] = ph.s[k].src.r + index_in[REGW-1:0];
      val[k] = ph.s[k].rd ? swizzle(rd_data[k], ph.s[k].src.swz, ph.s[k].src.neg)
                          : '0;
      if (ph.s[k].kind == K_ADDR) begin
        addr_en = 1'b1;
        addr    = fx_int(val[k][0]);
      end
      if (ph.s[k].kind == K_PRED) begin
        pred_en = 1'b1;
        pred_ok = pred_eval(ph.s[k].dst, val[k][0]);
      end
    end
  end

endmodule
