// tb_branch_unit: next PC for sequential flow (all lengths), relative
// branches (counted from the next instruction) and direct branches with and
// without an ADDR base, predicated branches taken and not taken, halt, and
// illegal instructions. Purely combinational check, one vector per #1.
module tb_branch_unit;
  import gpu_pkg::*;
  import gpu_asm_pkg::*;
  logic [MAXFRAG-1:0][31:0] frag;
  logic [2:0] len, len_in;
  phase_t [1:0] ph;
  logic fmt_err;
  logic valid, illegal, addr_en, pred_en, pred_ok;
  logic [PCW-1:0] pc, addr, next_pc;
  logic halt, taken, exec1;
  int checks = 0, failures = 0;

  vliw_decoder u_dec (.frag, .len, .ph, .fmt_err);
  branch_unit dut (.valid, .illegal, .pc, .len(len_in), .ph1(ph[1]), .addr_en, .addr,
                   .pred_en, .pred_ok, .next_pc, .halt, .taken, .exec1);
  assign len_in = len;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(string nm, logic [31:0] f0, logic [31:0] f1, bit pe, bit po, bit ae,
                     int av, int epc, bit etaken, bit ehalt, bit ill = 0);
    frag = {32'h0, 32'h0, f1, f0};
    valid = 1; illegal = ill; pred_en = pe; pred_ok = po; addr_en = ae; addr = 16'(av);
    pc = 16'd200;
    #1;
    chk(next_pc == 16'(epc) && taken == etaken && halt == ehalt,
        $sformatf("%s: next_pc %0d taken %0b halt %0b", nm, next_pc, taken, halt));
  endtask

  initial begin
    run("sequential len 1", F(1,0,OP_MOV,1), 0, 0, 0, 0, 0, 201, 0, 0);
    run("sequential len 2", F(0,0,OP_MOV,1), F(1,1,OP_MOV,2), 0, 0, 0, 0, 202, 0, 0);
    frag = {F(1,1,OP_SRC,0,0,1), F(0,1,OP_ADD,2), F(0,0,OP_SRC,0,0,1), F(0,0,OP_MUL,1)};
    #1; chk(next_pc == 16'd204, "sequential len 4");
    run("BL R +120", FI(1,1,OP_BLR,0,0,120), 0, 0, 0, 0, 0, 321, 1, 0);
    run("BL R -46", FI(1,1,OP_BLR,0,0,-46), 0, 0, 0, 0, 0, 155, 1, 0);
    run("BL D 85 (call)", FI(1,1,OP_BLD,0,0,85), 0, 0, 0, 0, 0, 85, 1, 0);
    run("ADDR + BL D 0 (return)", FI(1,1,OP_BLD,0,0,0), 0, 0, 0, 1, 61, 61, 1, 0);
    run("ADDR + BL D 120", FI(1,1,OP_BLD,0,0,120), 0, 0, 0, 1, 7, 127, 1, 0);
    run("PRED true + BL R", FI(1,1,OP_BLR,0,0,41), 0, 1, 1, 0, 0, 242, 1, 0);
    run("PRED false + BL R", FI(1,1,OP_BLR,0,0,41), 0, 1, 0, 0, 0, 201, 0, 0);
    run("PRED GE + BL R 41, two fragments", F(0,0,OP_PRED,int'(PC_GE),0,2),
        FI(1,1,OP_BLR,0,0,41), 1, 1, 0, 0, 243, 1, 0);
    run("HALT", FI(1,1,OP_HALT), 0, 0, 0, 0, 0, 201, 0, 1);
    run("HALT predicated off", FI(1,1,OP_HALT), 0, 1, 0, 0, 0, 201, 0, 0);
    run("illegal branch", FI(1,1,OP_BLR,0,0,41), 0, 0, 0, 0, 0, 201, 0, 0, 1);
    chk(!exec1, "illegal disables phase 1");
    run("phase0 branch fragment ignored", FI(1,0,OP_BLR,0,0,41), 0, 0, 0, 0, 0, 201, 0, 0);
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
