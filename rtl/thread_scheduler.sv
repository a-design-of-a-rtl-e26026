// thread_scheduler: fixed round-robin issue over NTHREADS hardware threads,
// with the per-thread status registers (active flag and program counter).
//
// Every cycle the issue slot moves to the next thread, whether or not that
// thread is running, as in the document's round-robin picture of the 8-thread
// processor: thread t issues at most once every NTHREADS cycles, so an
// instruction has left the pipeline before the next instruction of the same
// thread is fetched and no hazard logic is needed. The document asks for
// "thread status registers"; their contents (PC, active bit) and the
// start/update interface are this design's choice.
//
// Interface
//   start / start_mask / start_pc : one-cycle pulse that (re)starts the
//                                   threads in start_mask at start_pc
//   upd_valid / upd_tid / upd_pc / upd_halt : result of an executed
//                                   instruction (next PC, or thread ends)
//   issue_valid / issue_tid / issue_pc : the slot of this cycle
//   active : status bits of all threads
// Timing: issue outputs are combinational from the slot counter and the
// status registers; an update is visible at the thread's next slot if it
// arrives at least one cycle before it (NTHREADS must exceed the pipeline
// distance from issue to update, checked by an assertion in the core).
module thread_scheduler
  import gpu_pkg::*;
#(
  parameter int unsigned NTHREADS = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [NTHREADS-1:0]         start_mask,
  input  logic [PCW-1:0]              start_pc,
  input  logic                        upd_valid,
  input  logic [$clog2(NTHREADS)-1:0] upd_tid,
  input  logic [PCW-1:0]              upd_pc,
  input  logic                        upd_halt,
  output logic                        issue_valid,
  output logic [$clog2(NTHREADS)-1:0] issue_tid,
  output logic [PCW-1:0]              issue_pc,
  output logic [NTHREADS-1:0]         active
);
  localparam int unsigned TW = $clog2(NTHREADS);

  logic [TW-1:0]  slot;
  logic [PCW-1:0] pc [NTHREADS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot   <= '0;
      active <= '0;
      for (int t = 0; t < NTHREADS; t++) pc[t] <= '0;
    end else begin
      slot <= (slot == TW'(NTHREADS - 1)) ? '0 : slot + 1'b1;
      if (upd_valid) begin
        pc[upd_tid] <= upd_pc;
        if (upd_halt) active[upd_tid] <= 1'b0;
      end
      if (start) begin
        for (int t = 0; t < NTHREADS; t++)
          if (start_mask[t]) begin
            active[t] <= 1'b1;
            pc[t]     <= start_pc;
          end
      end
    end
  end

  assign issue_tid   = slot;
  assign issue_valid = active[slot];
  assign issue_pc    = pc[slot];

endmodule
