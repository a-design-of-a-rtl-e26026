// mem_unit: load/store request generation for the external data memory.
//
// Memory fragments, like branches, exist only in phase #1 (document). Their
// form is this design's: LD reg.mask, [ADDR + imm] and ST reg, [ADDR + imm],
// moving one 4-lane vector per access, where ADDR is phase #0's coordination
// address (0 without one). A store writes the lanes of the fragment's mask.
// The request is dropped when phase #1 is disabled by its predicate or the
// instruction is illegal.
//
// Interface: request outputs are combinational; the memory answers a load
// on the next cycle (rdata), which the core's write-back stage picks up.
module mem_unit
  import gpu_pkg::*;
#(
  parameter int unsigned DAW = 10              // data memory address bits
) (
  input  logic            exec1,
  input  phase_t          ph1,
  input  logic            addr_en,
  input  logic [PCW-1:0]  addr,
  input  vec4_t [1:0]     val1,                // phase #1 slot values
  output logic            req,
  output logic            we,
  output logic [DAW-1:0]  maddr,
  output vec4_t           wdata,
  output logic [3:0]      wmask,
  output logic            is_load,
  output logic [REGW-1:0] ld_reg,
  output logic [3:0]      ld_mask
);
  always_comb begin
    logic [PCW-1:0] a;
    req = 1'b0; we = 1'b0; maddr = '0; wdata = '0; wmask = '0;
    is_load = 1'b0; ld_reg = '0; ld_mask = '0;
    for (int k = 0; k < 2; k++) begin
      a = (addr_en ? addr : '0) + ph1.s[k].imm;
      if (exec1 && ph1.s[k].kind == K_PRIM && ph1.s[k].op inside {OP_LD, OP_ST}) begin
        req   = 1'b1;
        maddr = a[DAW-1:0];
        if (ph1.s[k].op == OP_ST) begin
          we    = 1'b1;
          wdata = val1[k];
          wmask = ph1.s[k].mask;
        end else begin
          is_load = 1'b1;
          ld_reg  = ph1.s[k].dst;
          ld_mask = ph1.s[k].mask;
        end
      end
    end
  end

endmodule
