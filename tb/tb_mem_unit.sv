// tb_mem_unit: load and store requests from phase #1: address = ADDR + imm,
// store data and lane mask, load destination, and suppression by a false
// predicate (exec1 low) or by non-memory fragments.
module tb_mem_unit;
  import gpu_pkg::*;
  import gpu_asm_pkg::*;
  logic [MAXFRAG-1:0][31:0] frag;
  logic [2:0] len;
  phase_t [1:0] ph;
  logic fmt_err;
  logic exec1, addr_en;
  logic [PCW-1:0] addr;
  vec4_t [1:0] val1;
  logic req, we, is_load;
  logic [9:0] maddr;
  vec4_t wdata;
  logic [3:0] wmask, ld_mask;
  logic [REGW-1:0] ld_reg;
  int checks = 0, failures = 0;

  vliw_decoder u_dec (.frag, .len, .ph, .fmt_err);
  mem_unit #(.DAW(10)) dut (.exec1, .ph1(ph[1]), .addr_en, .addr, .val1, .req, .we, .maddr,
                            .wdata, .wmask, .is_load, .ld_reg, .ld_mask);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    val1[0] = v4(1, 2, 3, 4); val1[1] = v4(5, 6, 7, 8);
    repeat (100) begin
      int off, base;
      bit ae, st;
      int r, m;
      off = $urandom_range(300); base = $urandom_range(500); ae = 1'($urandom);
      st = 1'($urandom); r = $urandom_range(15); m = $urandom_range(1, 15);
      frag = {32'h0, 32'h0, 32'h0, FI(1,1,st ? OP_ST : OP_LD, r, m, off)};
      exec1 = 1; addr_en = ae; addr = 16'(base);
      #1;
      chk(req && we == st && maddr == 10'((ae ? base : 0) + off), "address = ADDR + imm");
      if (st) chk(wdata == val1[0] && wmask == 4'(m), "store data and mask");
      else    chk(is_load && ld_reg == 4'(r) && ld_mask == 4'(m), "load destination");
      exec1 = 0;
      #1;
      chk(!req, "no request when phase #1 is disabled");
    end
    frag = {32'h0, 32'h0, 32'h0, FI(1,1,OP_BLR,0,0,5)};
    exec1 = 1;
    #1;
    chk(!req, "branch makes no memory request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
