// tb_pairing_checker: the eight rows of the exclusive pairing table (allowed
// / prohibited) plus further conflicts, each written as a real instruction
// and decoded by vliw_decoder before the check.
module tb_pairing_checker;
  import gpu_pkg::*;
  import gpu_asm_pkg::*;
  logic [MAXFRAG-1:0][31:0] frag;
  logic [2:0]   len;
  phase_t [1:0] ph;
  logic         fmt_err, illegal;
  logic [7:0]   why;
  int checks = 0, failures = 0;

  vliw_decoder    u_dec (.frag, .len, .ph, .fmt_err);
  pairing_checker dut   (.ph, .fmt_err, .illegal, .why);

  localparam logic [31:0] J = 32'h0;

  task automatic row(string nm, logic [31:0] f0, logic [31:0] f1, logic [31:0] f2,
                     logic [31:0] f3, bit exp_illegal, int exp_bit);
    frag = {f3, f2, f1, f0};
    #1;
    checks++;
    if (illegal !== exp_illegal || (exp_illegal && !why[exp_bit])) begin
      failures++;
      $display("FAIL %s: illegal=%0b why=%b", nm, illegal, why);
    end
  endtask

  // a..f = r0..r5
  initial begin
    row("mul a b c | add d e f",
        F(0,0,OP_MUL,0,MALL,1), F(0,0,OP_SRC,0,0,2), F(0,1,OP_ADD,3,MALL,4), F(1,1,OP_SRC,0,0,5), 0, 0);
    row("mul a b c, rcp.w c.y | add d e f, rsq.w e.x",
        F(0,0,OP_MUL,0,MALL,1), F(0,0,OP_RCP,0,MW,2,SW(1,1,1,1)),
        F(0,1,OP_ADD,3,MALL,4), F(1,1,OP_RSQ,0,MW,4,SW(0,0,0,0)), 0, 0);
    row("mul.x a b c, add.yz b c | add.xw d e f, mul.yzw e f",
        F(0,0,OP_MUL,0,MX,1), F(0,0,OP_ADD,0,MY|MZ,2),
        F(0,1,OP_ADD,3,MX|MW,4), F(1,1,OP_MUL,0,MY|MZ|MW,5), 0, 0);
    row("add.xyz a b c | add.x d e f",
        F(0,0,OP_ADD,0,MX|MY|MZ,1), F(0,0,OP_SRC,0,0,2), F(0,1,OP_ADD,3,MX,4), F(1,1,OP_SRC,0,0,5), 1, 1);
    row("rcp.x a b | rcp.y d e",
        F(0,0,OP_RCP,0,MX,1), F(1,1,OP_RCP,3,MY,4), J, J, 1, 3);
    row("mov a b | mov d e",
        F(0,0,OP_MOV,0,MALL,1), F(1,1,OP_MOV,3,MALL,4), J, J, 0, 0);
    row("branch 100 | branch 200",
        FI(0,0,OP_BLR,0,0,100), FI(1,1,OP_BLR,0,0,200), J, J, 1, 5);
    row("mul a b a | indirect a.x, add d e f",
        F(0,0,OP_MUL,0,MALL,1), F(0,1,OP_ADDR,0,0,0), F(1,1,OP_ADD,3,MALL,4), J, 1, 6);
    // further rules
    row("mul.x | mul.x",
        F(0,0,OP_MUL,0,MX,1), F(0,0,OP_SRC,0,0,2), F(0,1,OP_MUL,3,MX,4), F(1,1,OP_SRC,0,0,5), 1, 2);
    row("mul.xyz, add.w override | add.w",
        F(0,0,OP_MUL,0,MX|MY|MZ,1), F(0,0,OP_ADD,0,MW,2), F(0,1,OP_ADD,3,MW,4), F(1,1,OP_SRC,0,0,5), 1, 1);
    row("add.x a b a (one fragment) | add.x d e f",
        F(0,0,OP_ADD,0,MX,1), F(0,1,OP_ADD,3,MX,4), F(1,1,OP_SRC,0,0,5), J, 1, 1);
    row("add.xy | add.zw",
        F(0,0,OP_ADD,0,MX|MY,1), F(0,0,OP_SRC,0,0,2), F(0,1,OP_ADD,3,MZ|MW,4), F(1,1,OP_SRC,0,0,5), 0, 0);
    row("rsq.z | rsq.w",
        F(0,0,OP_RSQ,0,MZ,1), F(1,1,OP_RSQ,3,MW,4), J, J, 1, 4);
    row("rcp.xy in one phase",
        F(1,0,OP_RCP,0,MX|MY,1), J, J, J, 1, 3);
    row("cmp.x | add.x (loop head: compare and increment)",
        F(0,0,OP_CMP,0,MX,1), F(0,0,OP_SRC,0,0,2), F(0,1,OP_ADD,3,MX,4), F(1,1,OP_SRC,0,0,5), 0, 0);
    row("cmp.x | cmp.x share the comparator",
        F(0,0,OP_CMP,0,MX,1), F(0,0,OP_SRC,0,0,2), F(0,1,OP_CMP,3,MX,4), F(1,1,OP_SRC,0,0,5), 1, 7);
    row("two ADDR",
        F(0,0,OP_ADDR,0,0,1), F(0,0,OP_ADDR,0,0,2), FI(1,1,OP_BLD,0,0,3), J, 1, 6);
    row("pred + addr | branch direct (compare-branch)",
        F(0,0,OP_PRED,int'(PC_N),0,0), F(0,0,OP_ADDR,0,0,1), FI(1,1,OP_BLD,0,0,120), J, 0, 0);
    row("load in phase #1 with add in phase #0",
        F(0,0,OP_ADD,0,MALL,1), F(0,0,OP_SRC,0,0,2), FI(1,1,OP_LD,3,MALL,4), J, 0, 0);
    row("store in phase #0",
        FI(1,0,OP_ST,3,MALL,4), J, J, J, 1, 5);
    row("format error propagates",
        F(0,1,OP_MOV,0), F(1,0,OP_MOV,1), J, J, 1, 0);
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
