// tb_examples: runs the published arithmetic and branch examples, each
// encoded fragment for fragment as printed (E and P bits, fragment order,
// which phase holds which fragment), on thread 0 of the default-size core.
// Registers A..F are r0..r5. Each example is started on its own, ends with
// HALT, and is checked for its results and for the number of instructions
// it took (HALT excluded):
//   MUL_sat A, B, A                       one fragment, implied source
//   ADD A, B, C                           two fragments
//   ADD A, B[D.w], C                      ADDR in phase #0, indexed source
//   ADD_predicate(E) A, B, C[D.w]         PRED + ADDR coordinating phase #1
//   MUL A.xzw | MOV A.y | ADD D.xyz | RCP D.w   four operations, one instruction
//   MUL A, B, C  +  ADD D, E, F           dual arithmetic
//   BL R 120                              relative branch
//   if (A.x < 0) BL D B.x + 120           conditional indirect branch
//                                         (B.x = 0: target at 120)
//   CALL 85 / RETURN                      swizzle push/pop of the return PC
// Expected values are computed here with real arithmetic from inputs that
// are exact binary fractions.
module tb_examples;
  import gpu_pkg::*;
  import gpu_asm_pkg::*;
  localparam int N = 8;
  localparam int DAW = 10;
  localparam int A = 0, B = 1, C = 2, D = 3, E = 4, Fr = 5;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0;
  logic [9:0] imem_waddr = '0;
  logic [31:0] imem_wdata = '0;
  logic start = 0;
  logic [N-1:0] start_mask = '0;
  logic [PCW-1:0] start_pc = '0;
  logic host_we = 0;
  logic [2:0] host_tid = '0;
  logic [REGW-1:0] host_reg = '0;
  vec4_t host_wdata = '0, host_rdata;
  logic dmem_req, dmem_we;
  logic [DAW-1:0] dmem_addr;
  vec4_t dmem_wdata, dmem_rdata;
  logic [3:0] dmem_wmask;
  logic [N-1:0] active;
  logic busy, retire_valid, retire_illegal, retire_dual, retire_taken, retire_pred_off, retire_mem;
  logic [2:0] retire_tid, retire_len;

  gpu_core dut (.*);
  data_mem_model #(.DAW(DAW)) u_dmem (.clk, .req(dmem_req), .we(dmem_we), .addr(dmem_addr),
                                      .wdata(dmem_wdata), .wmask(dmem_wmask), .rdata(dmem_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ programs
  logic [31:0] prog [1024];
  int pc = 0;
  task automatic emit(input logic [31:0] f [$]);
    foreach (f[i]) begin prog[pc] = f[i]; pc++; end
  endtask

  localparam int P_EX1 = 300, P_EX2 = 310, P_EX3 = 320, P_EX4 = 330, P_EX5 = 340,
                 P_DUAL = 350, P_BLR = 360, P_CBR = 500, P_CALL = 700, P_FUNC = 85;

  task automatic build();
    foreach (prog[i]) prog[i] = FI(1,1,OP_HALT);
    // MUL_sat A, B, A
    pc = P_EX1;
    emit('{F(1,0,OP_MULS,A,MALL,B)});
    // ADD A, B, C
    pc = P_EX2;
    emit('{F(0,0,OP_ADD,A,MALL,B), F(1,0,OP_SRC,0,0,C)});
    // ADD A, B[D.w], C
    pc = P_EX3;
    emit('{F(0,0,OP_ADDR,0,0,D,SW(3,3,3,3)), F(0,1,OP_ADD,A,MALL,B,SW(0,1,2,3),0,1),
           F(1,1,OP_SRC,0,0,C)});
    // ADD_predicate(E) A, B, C[D.w]
    pc = P_EX4;
    emit('{F(0,0,OP_PRED,int'(PC_Z),0,E,SW(0,0,0,0)), F(0,0,OP_ADDR,0,0,D,SW(3,3,3,3)),
           F(0,1,OP_ADD,A,MALL,B), F(1,1,OP_SRC,0,0,C,SW(0,1,2,3),0,1)});
    // MUL A.xzw, B, C; MOV A.y, C.y | ADD D.xyz, E, F; RCP D.w, F.w
    pc = P_EX5;
    emit('{F(0,0,OP_MUL,A,MALL,B), F(0,0,OP_MOV,0,MY,C),
           F(0,1,OP_ADD,D,MX|MY|MZ,E), F(1,1,OP_RCP,0,MW,Fr)});
    // MUL A, B, C | ADD D, E, F
    pc = P_DUAL;
    emit('{F(0,0,OP_MUL,A,MALL,B), F(0,0,OP_SRC,0,0,C), F(0,1,OP_ADD,D,MALL,E), F(1,1,OP_SRC,0,0,Fr)});
    // BL R 120: lands 120 fragments past the next instruction
    pc = P_BLR;
    emit('{FI(1,1,OP_BLR,0,0,120)});
    pc = P_BLR + 1 + 120;
    emit('{F(1,0,OP_MOV,A,MALL,B)});
    // if (A.x < 0) PC = B.x + 120; fall-through writes D, target writes E
    pc = P_CBR;
    emit('{F(0,0,OP_PRED,int'(PC_N),0,A,SW(0,0,0,0)), F(0,0,OP_ADDR,0,0,B,SW(0,0,0,0)),
           FI(1,1,OP_BLD,0,0,120)});
    emit('{F(1,0,OP_MOV,D,MALL,C)});
    pc = 120;
    emit('{F(1,0,OP_MOV,E,MALL,B)});
    // CALL 85; the function at 85 writes E and returns
    pc = P_CALL;
    emit('{F(0,0,OP_MOV,A,MY|MZ|MW,A,SW(0,0,1,2)), F(0,0,OP_MVS,A,MX,0), FI(1,1,OP_BLD,0,0,85)});
    emit('{F(1,0,OP_MOV,D,MALL,C)});
    pc = P_FUNC;
    emit('{F(1,0,OP_MOV,E,MALL,B)});
    emit('{F(0,0,OP_MOV,A,MX|MY|MZ,A,SW(1,2,3,3)), F(0,0,OP_ADDR,0,0,A,SW(0,0,0,0)),
           FI(1,1,OP_BLD,0,0,0)});
  endtask

  // ------------------------------------------------------------ helpers
  int ret_cnt = 0, n_taken = 0, n_dual = 0, n_pred_off = 0;
  always @(posedge clk)
    if (retire_valid) begin
      ret_cnt++;
      n_taken    += int'(retire_taken);
      n_dual     += int'(retire_dual);
      n_pred_off += int'(retire_pred_off);
    end

  typedef real rv4_t [4];
  rv4_t r [NREGS];

  function automatic bit near(logic [31:0] got, real e);
    real d;
    d = rl(got) - e;
    return d < 0.0001 && d > -0.0001;
  endfunction

  // Loads all registers of thread 0 from r[].
  task automatic load_regs();
    for (int i = 0; i < NREGS; i++) begin
      host_we = 1; host_tid = '0; host_reg = REGW'(i);
      host_wdata = v4(r[i][0], r[i][1], r[i][2], r[i][3]);
      @(negedge clk);
    end
    host_we = 0;
  endtask

  task automatic expect_reg(int i, rv4_t e, string nm);
    host_tid = '0; host_reg = REGW'(i);
    #1;
    for (int c = 0; c < 4; c++)
      chk(near(host_rdata[c], e[c]),
          $sformatf("%s r%0d lane %0d: got %f expected %f", nm, i, c, rl(host_rdata[c]), e[c]));
  endtask

  task automatic run(string nm, int pc0, int want);
    ret_cnt = 0;
    start = 1; start_mask = 8'h01; start_pc = PCW'(pc0);
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    chk(ret_cnt - 1 == want, $sformatf("%s: %0d instructions, expected %0d", nm, ret_cnt - 1, want));
  endtask

  task automatic default_regs();
    for (int i = 0; i < NREGS; i++)
      for (int c = 0; c < 4; c++) r[i][c] = 0.25 * (i + 1) - 0.5 * c + 0.125 * (i % 3);
  endtask

  function automatic real sat(real v);
    return v < 0.0 ? 0.0 : v > 1.0 ? 1.0 : v;
  endfunction

  initial begin
    rv4_t e, e2;
    build();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      imem_we = 1; imem_waddr = 10'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;

    // MUL_sat A, B, A
    default_regs();
    r[A] = '{0.5, -0.25, 1.5, 2.0};
    r[B] = '{1.5, 2.0, 0.5, 0.75};
    load_regs();
    run("MUL_sat A, B, A", P_EX1, 1);
    for (int c = 0; c < 4; c++) e[c] = sat(r[B][c] * r[A][c]);
    expect_reg(A, e, "MUL_sat");
    expect_reg(B, r[B], "MUL_sat source kept");

    // ADD A, B, C
    default_regs();
    load_regs();
    run("ADD A, B, C", P_EX2, 1);
    for (int c = 0; c < 4; c++) e[c] = r[B][c] + r[C][c];
    expect_reg(A, e, "ADD");

    // ADD A, B[D.w], C with D.w = 4: B[4] = r5
    default_regs();
    r[D][3] = 4.0;
    load_regs();
    run("ADD A, B[D.w], C", P_EX3, 1);
    for (int c = 0; c < 4; c++) e[c] = r[B + 4][c] + r[C][c];
    expect_reg(A, e, "indexed ADD");

    // ADD_predicate(E) A, B, C[D.w] with D.w = 3: C[3] = r5; E.x = 0, then 1
    default_regs();
    r[D][3] = 3.0;
    r[E][0] = 0.0;
    load_regs();
    run("ADD_predicate(E), E.x == 0", P_EX4, 1);
    for (int c = 0; c < 4; c++) e[c] = r[B][c] + r[C + 3][c];
    expect_reg(A, e, "predicated ADD, predicate true");
    r[E][0] = 1.0;
    load_regs();
    n_pred_off = 0;
    run("ADD_predicate(E), E.x != 0", P_EX4, 1);
    expect_reg(A, r[A], "predicated ADD, predicate false");
    chk(n_pred_off == 1, "predicate disabled phase #1");

    // MUL A.xzw | MOV A.y | ADD D.xyz | RCP D.w
    default_regs();
    r[Fr][3] = 0.5;
    load_regs();
    n_dual = 0;
    run("MUL/MOV/ADD/RCP in one instruction", P_EX5, 1);
    for (int c = 0; c < 4; c++) e[c] = (c == 1) ? r[C][1] : r[B][c] * r[C][c];
    expect_reg(A, e, "MUL.xzw + MOV.y");
    for (int c = 0; c < 3; c++) e2[c] = r[E][c] + r[Fr][c];
    e2[3] = 1.0 / r[Fr][3];
    expect_reg(D, e2, "ADD.xyz + RCP.w");
    chk(n_dual == 1, "both phases wrote");

    // MUL A, B, C | ADD D, E, F
    default_regs();
    load_regs();
    run("MUL A, B, C | ADD D, E, F", P_DUAL, 1);
    for (int c = 0; c < 4; c++) begin
      e[c]  = r[B][c] * r[C][c];
      e2[c] = r[E][c] + r[Fr][c];
    end
    expect_reg(A, e, "dual MUL");
    expect_reg(D, e2, "dual ADD");

    // BL R 120
    default_regs();
    load_regs();
    n_taken = 0;
    run("BL R 120", P_BLR, 2);
    expect_reg(A, r[B], "relative branch target executed");
    chk(n_taken == 1, "relative branch taken");

    // if (A.x < 0) PC = B.x + 120, with B.x = 0: target 120
    default_regs();
    r[A][0] = -1.0;
    r[B][0] = 0.0;
    load_regs();
    run("conditional branch, taken", P_CBR, 2);
    expect_reg(D, r[D], "taken: fall-through skipped");
    expect_reg(E, r[B], "taken: target executed");
    r[A][0] = 1.0;
    load_regs();
    run("conditional branch, not taken", P_CBR, 2);
    expect_reg(D, r[C], "not taken: fall-through executed");
    expect_reg(E, r[E], "not taken: target skipped");

    // CALL 85 / RETURN
    default_regs();
    r[A] = '{0.0, 0.0, 0.0, 0.0};
    load_regs();
    run("CALL 85 and RETURN", P_CALL, 4);
    expect_reg(E, r[B], "function body executed");
    expect_reg(D, r[C], "execution resumed after the call");
    expect_reg(A, '{0.0, 0.0, 0.0, 0.0}, "return stack popped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
