// branch_unit: next-PC logic of a thread. Branches are phase #1 fragments,
// and compound control flow is built from them plus phase #0 coordination,
// as in the document's examples:
//   BLR imm        PC = PC + len + imm                (relative branch)
//   BLD imm        PC = ADDR + imm                    (direct / indirect)
//   PRED + BLx     taken only when the predicate holds (compare-branch)
//   MVS + BLD      call: the return PC is saved in a register lane
//   ADDR + BLD 0   return: jump to the saved PC
//   HALT           the thread stops (this design's addition)
// The relative offset counts from the instruction after the branch: the
// document's loop example branches forward 41 over a 40-fragment body plus
// the one-fragment back branch, and back -46 from the end of that branch to
// the loop head, which fits only this reading. Offsets are in fragments.
// A predicate that fails disables all of phase #1, branch included. An
// illegal instruction only advances the PC. ADDR is 0 when phase #0 has no
// ADDR fragment.
//
// Interface: the instruction's PC and length, phase #1's decoded fragments,
// phase #0's coordination values. next_pc / halt go to the thread status
// registers; taken reports a taken branch. Purely combinational.
module branch_unit
  import gpu_pkg::*;
(
  input  logic           valid,
  input  logic           illegal,
  input  logic [PCW-1:0] pc,
  input  logic [2:0]     len,
  input  phase_t         ph1,
  input  logic           addr_en,
  input  logic [PCW-1:0] addr,
  input  logic           pred_en,
  input  logic           pred_ok,
  output logic [PCW-1:0] next_pc,
  output logic           halt,
  output logic           taken,
  output logic           exec1      // phase #1 may execute
);
  always_comb begin
    logic [PCW-1:0] base;
    next_pc = pc + PCW'(len);
    halt    = 1'b0;
    taken   = 1'b0;
    exec1   = valid && !illegal && (!pred_en || pred_ok);
    base    = addr_en ? addr : '0;
    for (int k = 0; k < 2; k++) begin
      if (exec1 && ph1.s[k].kind == K_PRIM) begin
        case (ph1.s[k].op)
          OP_BLR:  begin next_pc = pc + PCW'(len) + PCW'(ph1.s[k].imm); taken = 1'b1; end
          OP_BLD:  begin next_pc = base + PCW'(ph1.s[k].imm); taken = 1'b1; end
          OP_HALT: halt = 1'b1;
          default: ;
        endcase
      end
    end
  end

endmodule
