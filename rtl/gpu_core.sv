// gpu_core: an 8-thread shader core that executes variable-length
// instruction words (VL-IW) in two phases sharing one register group and one
// set of ALUs.
//
// Structure (after the document's dual-phase block diagram):
//   S0  thread_scheduler picks the thread of this cycle (fixed round robin)
//       and instr_mem reads the four fragments at its PC.
//   S1  vliw_decoder splits the instruction into phase #0 / phase #1,
//       pairing_checker applies the exclusive pairing rules, two
//       operand_fetch units read the GPRs (phase #0 coordination - ADDR,
//       PRED - feeds phase #1's fetch), pre_coordinate routes both phases
//       onto the shared ALU lanes.
//   S2  common_alu computes; branch_unit gives the thread's next PC (written
//       back to the scheduler here); mem_unit issues phase #1's load/store.
//   S3  post_coordinate collects each phase's result (and load data) and
//       write_back writes up to two destinations into gpr_file.
// A thread issues once every NTHREADS cycles, so all of an instruction's
// effects are done before the thread's next instruction is fetched: no
// interlock, forwarding or branch penalty exists, which is the point of the
// multi-thread organisation. Pipeline depth and stage split are this
// design's choice; so are the host ports.
//
// Interface
//   imem_*      load program fragments (one per cycle)
//   start*      start the threads in start_mask at start_pc
//   host_*      read/write any GPR of any thread (use while threads stop)
//   dmem_*      external data memory: request in S2, rdata expected one
//               cycle later (4-lane vectors, lane write mask)
//   active      running threads; busy = any thread running or in flight
//   retire_*    one record per executed instruction, at S3
module gpu_core
  import gpu_pkg::*;
#(
  parameter int unsigned NTHREADS   = 8,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DAW        = 10
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_waddr,
  input  logic [31:0]                   imem_wdata,
  input  logic                          start,
  input  logic [NTHREADS-1:0]           start_mask,
  input  logic [PCW-1:0]                start_pc,
  input  logic                          host_we,
  input  logic [$clog2(NTHREADS)-1:0]   host_tid,
  input  logic [REGW-1:0]               host_reg,
  input  vec4_t                         host_wdata,
  output vec4_t                         host_rdata,
  output logic                          dmem_req,
  output logic                          dmem_we,
  output logic [DAW-1:0]                dmem_addr,
  output vec4_t                         dmem_wdata,
  output logic [3:0]                    dmem_wmask,
  input  vec4_t                         dmem_rdata,
  output logic [NTHREADS-1:0]           active,
  output logic                          busy,
  output logic                          retire_valid,
  output logic [$clog2(NTHREADS)-1:0]   retire_tid,
  output logic [2:0]                    retire_len,
  output logic                          retire_illegal,
  output logic                          retire_dual,     // both phases wrote
  output logic                          retire_taken,    // branch taken
  output logic                          retire_pred_off, // predicate disabled phase #1
  output logic                          retire_mem       // load or store issued
);
  localparam int unsigned TW  = $clog2(NTHREADS);
  localparam int unsigned IAW = $clog2(IMEM_DEPTH);

  // ------------------------------------------------------------------ S0
  logic           iss_valid;
  logic [TW-1:0]  iss_tid;
  logic [PCW-1:0] iss_pc;
  logic           upd_valid, upd_halt;
  logic [TW-1:0]  upd_tid;
  logic [PCW-1:0] upd_pc;

  thread_scheduler #(.NTHREADS(NTHREADS)) u_sched (
    .clk, .rst_n, .start, .start_mask, .start_pc,
    .upd_valid, .upd_tid, .upd_pc, .upd_halt,
    .issue_valid(iss_valid), .issue_tid(iss_tid), .issue_pc(iss_pc),
    .active
  );

  logic [MAXFRAG-1:0][31:0] frag;
  instr_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .rd_addr(iss_pc[IAW-1:0]), .rd_frag(frag)
  );

  logic           s1_valid;
  logic [TW-1:0]  s1_tid;
  logic [PCW-1:0] s1_pc;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_tid <= '0; s1_pc <= '0;
    end else begin
      s1_valid <= iss_valid; s1_tid <= iss_tid; s1_pc <= iss_pc;
    end

  // ------------------------------------------------------------------ S1
  logic [2:0]   len;
  phase_t [1:0] ph;
  logic         fmt_err, illegal;
  logic [7:0]   why;

  vliw_decoder u_dec (.frag, .len, .ph, .fmt_err);
  pairing_checker u_pair (.ph, .fmt_err, .illegal, .why);

  logic [3:0][TW-1:0]   rd_tid;
  logic [3:0][REGW-1:0] rd_reg;
  vec4_t [3:0]          rd_data;
  vec4_t [1:0][1:0]     val;
  logic                 addr_en, pred_en, pred_ok;
  logic [PCW-1:0]       addr;
  logic                 unused_addr_en1, unused_pred_en1, unused_pred_ok1;
  logic [PCW-1:0]       unused_addr1;

  operand_fetch #(.NTHREADS(NTHREADS)) u_of0 (
    .ph(ph[0]), .tid(s1_tid), .index_en(1'b0), .index_in('0),
    .rd_tid(rd_tid[1:0]), .rd_reg(rd_reg[1:0]), .rd_data(rd_data[1:0]),
    .val(val[0]), .addr_en, .addr, .pred_en, .pred_ok
  );
  operand_fetch #(.NTHREADS(NTHREADS)) u_of1 (
    .ph(ph[1]), .tid(s1_tid), .index_en(addr_en), .index_in(addr),
    .rd_tid(rd_tid[3:2]), .rd_reg(rd_reg[3:2]), .rd_data(rd_data[3:2]),
    .val(val[1]), .addr_en(unused_addr_en1), .addr(unused_addr1),
    .pred_en(unused_pred_en1), .pred_ok(unused_pred_ok1)
  );

  lane_ops_t [1:0]      lops;
  logic [1:0][REGW-1:0] dst;
  logic [1:0][3:0]      wmask;
  vec4_t [1:0]          mov_val;
  vec4_t                add_a, add_b, mul_a, mul_b;
  logic [3:0]           mul_sat;
  vec4_t                cmp_a, cmp_b;
  word_t                rcp_in, rsq_in;

  pre_coordinate u_pre (
    .ph, .val, .ret_pc(s1_pc + PCW'(len)),
    .lops, .dst, .wmask, .mov_val,
    .add_a, .add_b, .cmp_a, .cmp_b, .mul_a, .mul_b, .mul_sat, .rcp_in, .rsq_in
  );

  // S1 -> S2 register
  typedef struct packed {
    logic            valid;
    logic [TW-1:0]   tid;
    logic [PCW-1:0]  pc;
    logic [2:0]      len;
    logic            illegal;
    phase_t          ph1;
    vec4_t [1:0]     val1;
    logic            addr_en;
    logic [PCW-1:0]  addr;
    logic            pred_en;
    logic            pred_ok;
    lane_ops_t [1:0] lops;
    logic [1:0][REGW-1:0] dst;
    logic [1:0][3:0] wmask;
    vec4_t [1:0]     mov_val;
    vec4_t           add_a, add_b, mul_a, mul_b;
    vec4_t           cmp_a, cmp_b;
    logic [3:0]      mul_sat;
    word_t           rcp_in, rsq_in;
  } s2_t;
  s2_t s2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s2 <= '0;
    else begin
      s2.valid   <= s1_valid;
      s2.tid     <= s1_tid;
      s2.pc      <= s1_pc;
      s2.len     <= len;
      s2.illegal <= illegal;
      s2.ph1     <= ph[1];
      s2.val1    <= val[1];
      s2.addr_en <= addr_en;
      s2.addr    <= addr;
      s2.pred_en <= pred_en;
      s2.pred_ok <= pred_ok;
      s2.lops    <= lops;
      s2.dst     <= dst;
      s2.wmask   <= wmask;
      s2.mov_val <= mov_val;
      s2.add_a   <= add_a;   s2.add_b   <= add_b;   s2.cmp_a <= cmp_a;  s2.cmp_b <= cmp_b;
      s2.mul_a   <= mul_a;   s2.mul_b   <= mul_b;   s2.mul_sat <= mul_sat;
      s2.rcp_in  <= rcp_in;  s2.rsq_in  <= rsq_in;
    end

  // ------------------------------------------------------------------ S2
  vec4_t add_y, cmp_y, mul_y;
  word_t rcp_y, rsq_y;
  common_alu u_alu (
    .add_a(s2.add_a), .add_b(s2.add_b), .cmp_a(s2.cmp_a), .cmp_b(s2.cmp_b),
    .mul_a(s2.mul_a), .mul_b(s2.mul_b), .mul_sat(s2.mul_sat),
    .rcp_in(s2.rcp_in), .rsq_in(s2.rsq_in),
    .add_y, .cmp_y, .mul_y, .rcp_y, .rsq_y
  );

  logic taken, exec1;
  branch_unit u_br (
    .valid(s2.valid), .illegal(s2.illegal), .pc(s2.pc), .len(s2.len),
    .ph1(s2.ph1), .addr_en(s2.addr_en), .addr(s2.addr),
    .pred_en(s2.pred_en), .pred_ok(s2.pred_ok),
    .next_pc(upd_pc), .halt(upd_halt), .taken, .exec1
  );
  assign upd_valid = s2.valid;
  assign upd_tid   = s2.tid;

  logic            is_load;
  logic [REGW-1:0] unused_ld_reg;
  logic [3:0]      unused_ld_mask;
  mem_unit #(.DAW(DAW)) u_mem (
    .exec1, .ph1(s2.ph1), .addr_en(s2.addr_en), .addr(s2.addr), .val1(s2.val1),
    .req(dmem_req), .we(dmem_we), .maddr(dmem_addr), .wdata(dmem_wdata),
    .wmask(dmem_wmask), .is_load, .ld_reg(unused_ld_reg), .ld_mask(unused_ld_mask)
  );

  // S2 -> S3 register
  typedef struct packed {
    logic            valid;
    logic [TW-1:0]   tid;
    logic [2:0]      len;
    logic            illegal;
    logic            exec1;
    logic            taken;
    logic            pred_off;
    logic            mem;
    lane_ops_t [1:0] lops;
    logic [1:0][REGW-1:0] dst;
    logic [1:0][3:0] wmask;
    vec4_t [1:0]     mov_val;
    vec4_t           add_y, cmp_y, mul_y;
    word_t           rcp_y, rsq_y;
  } s3_t;
  s3_t s3;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s3 <= '0;
    else begin
      s3.valid    <= s2.valid;
      s3.tid      <= s2.tid;
      s3.len      <= s2.len;
      s3.illegal  <= s2.illegal;
      s3.exec1    <= exec1;
      s3.taken    <= taken;
      s3.pred_off <= s2.valid && !s2.illegal && s2.pred_en && !s2.pred_ok;
      s3.mem      <= dmem_req;
      s3.lops     <= s2.lops;
      s3.dst      <= s2.dst;
      s3.wmask    <= s2.wmask;
      s3.mov_val  <= s2.mov_val;
      s3.add_y    <= add_y;  s3.cmp_y <= cmp_y;  s3.mul_y <= mul_y;
      s3.rcp_y    <= rcp_y;  s3.rsq_y <= rsq_y;
    end

  // ------------------------------------------------------------------ S3
  vec4_t [1:0] res;
  post_coordinate u_post (
    .lops(s3.lops), .mov_val(s3.mov_val), .add_y(s3.add_y), .cmp_y(s3.cmp_y),
    .mul_y(s3.mul_y), .rcp_y(s3.rcp_y), .rsq_y(s3.rsq_y), .ld_data(dmem_rdata),
    .res
  );

  logic [1:0]           wr_en;
  logic [1:0][TW-1:0]   wr_tid;
  logic [1:0][REGW-1:0] wr_reg;
  logic [1:0][3:0]      wr_mask;
  vec4_t [1:0]          wr_data;
  write_back #(.NTHREADS(NTHREADS)) u_wb (
    .valid(s3.valid), .illegal(s3.illegal), .exec1(s3.exec1), .tid(s3.tid),
    .dst(s3.dst), .wmask(s3.wmask), .res,
    .wr_en, .wr_tid, .wr_reg, .wr_mask, .wr_data
  );

  gpr_file #(.NTHREADS(NTHREADS)) u_gpr (
    .clk, .rd_tid, .rd_reg, .rd_data,
    .wr_en, .wr_tid, .wr_reg, .wr_mask, .wr_data,
    .host_we, .host_tid, .host_reg, .host_wdata, .host_rdata
  );

  assign busy            = (|active) || s1_valid || s2.valid || s3.valid;
  assign retire_valid    = s3.valid;
  assign retire_tid      = s3.tid;
  assign retire_len      = s3.len;
  assign retire_illegal  = s3.illegal;
  assign retire_dual     = wr_en[0] && wr_en[1];
  assign retire_taken    = s3.taken;
  assign retire_pred_off = s3.pred_off;
  assign retire_mem      = s3.mem;

  // A thread's next fetch must come after its previous instruction has
  // updated the PC (S2) and written its results (S3).
  initial assert (NTHREADS >= 4)
    else $error("gpu_core: NTHREADS must be at least 4");

  // Load data arrive one cycle after the request; flag a load in S3 the
  // memory could not have answered (would mean a missing request).
  // The assertion samples rst_n on the clock, which a linter may report as
  // the reset being used both asynchronously and synchronously; the flops
  // themselves all reset asynchronously.
  property p_load_has_req;
    @(posedge clk) disable iff (!rst_n)
      (s3.valid && |{s3.lops[1][0] == L_LD, s3.lops[1][1] == L_LD,
                     s3.lops[1][2] == L_LD, s3.lops[1][3] == L_LD} && s3.exec1) |-> s3.mem;
  endproperty
  a_load_has_req: assert property (p_load_has_req);

endmodule
