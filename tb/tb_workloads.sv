// tb_workloads: runs the benchmark kernels one at a time on a single thread
// of the default-size core and counts the instructions each one needs,
// excluding the final HALT. Kernels: 4-lane dot product, 4x4 matrix times
// vector, a conditional indirect branch (taken and not taken), a nested
// call/return, and a counted loop of 100 iterations whose loop head pairs
// the compare (phase #0) with the counter increment (phase #1), laid out
// fragment for fragment like the published loop so that its branch offsets
// (+41 forward, -46 back) are used as printed. Each result
// is checked against a value computed here, and each instruction count
// against the count expected for this instruction set; the published counts
// are printed next to them for comparison.
module tb_workloads;
  import gpu_pkg::*;
  import gpu_asm_pkg::*;
  localparam int N = 8;
  localparam int DAW = 10;

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
    repeat (100000) @(posedge clk);
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

  localparam int P_DOT = 0, P_MAT = 20, P_BR = 60, P_BR_T = 80, P_CALL = 100,
                 P_F1 = 120, P_F2 = 140, P_LOOP = 200;
  int loop_head, loop_exit;

  task automatic call(int target);
    emit('{F(0,0,OP_MOV,13,MY|MZ|MW,13,SW(0,0,1,2)), F(0,0,OP_MVS,13,MX,0),
           FI(1,1,OP_BLD,0,0,target)});
  endtask
  task automatic ret();
    emit('{F(0,0,OP_MOV,13,MX|MY|MZ,13,SW(1,2,3,3)), F(0,0,OP_ADDR,0,0,13,SW(0,0,0,0)),
           FI(1,1,OP_BLD,0,0,0)});
  endtask

  task automatic build();
    int body, back;
    foreach (prog[i]) prog[i] = FI(1,1,OP_HALT);
    // DOT4: r3.x = dot(r0, r1)
    pc = P_DOT;
    emit('{F(0,0,OP_MUL,2,MALL,0), F(1,0,OP_SRC,0,0,1)});
    emit('{F(0,0,OP_ADD,3,MX|MY,2,SW(0,2,0,0)), F(1,0,OP_SRC,0,0,2,SW(1,3,0,0))});
    emit('{F(0,0,OP_ADD,3,MX,3,SW(0,0,0,0)), F(1,0,OP_SRC,0,0,3,SW(1,1,1,1))});
    emit('{FI(1,1,OP_HALT)});
    // Matrix4: r9 = [r4 r5 r6 r7] * r8
    pc = P_MAT;
    emit('{F(0,0,OP_MUL,9,MALL,4), F(1,0,OP_SRC,0,0,8,SW(0,0,0,0))});
    emit('{F(0,0,OP_MUL,10,MALL,5), F(1,0,OP_SRC,0,0,8,SW(1,1,1,1))});
    emit('{F(0,0,OP_MUL,11,MALL,6), F(0,0,OP_SRC,0,0,8,SW(2,2,2,2)),
           F(0,1,OP_ADD,9,MALL,9), F(1,1,OP_SRC,0,0,10)});
    emit('{F(0,0,OP_MUL,10,MALL,7), F(0,0,OP_SRC,0,0,8,SW(3,3,3,3)),
           F(0,1,OP_ADD,9,MALL,9), F(1,1,OP_SRC,0,0,11)});
    emit('{F(0,0,OP_ADD,9,MALL,9), F(1,0,OP_SRC,0,0,10)});
    emit('{FI(1,1,OP_HALT)});
    // Conditional indirect branch: if (r12.x < 0) goto r12.y
    pc = P_BR;
    emit('{F(0,0,OP_PRED,int'(PC_N),0,12,SW(0,0,0,0)), F(0,0,OP_ADDR,0,0,12,SW(1,1,1,1)),
           FI(1,1,OP_BLD,0,0,0)});
    emit('{F(1,0,OP_MOV,14,MX,15,SW(0,0,0,0))});          // not taken: r14.x = r15.x
    emit('{FI(1,1,OP_HALT)});
    pc = P_BR_T;
    emit('{F(1,0,OP_MOV,14,MX,15,SW(1,1,1,1))});          // taken: r14.x = r15.y
    emit('{FI(1,1,OP_HALT)});
    // Nested call: main calls f1, f1 calls f2
    pc = P_CALL;
    call(P_F1);
    emit('{FI(1,1,OP_HALT)});
    pc = P_F1;
    call(P_F2);
    ret();
    pc = P_F2;
    ret();
    // for (i = 0; i < 100; i++) sum += i + 1;  r0 = {i, 1, 100, -}, r1.x = sum.
    // Laid out as the published loop: a 3-fragment head (compare | increment),
    // a 2-fragment PRED GE + BL R 41, a 40-fragment body (one 2-fragment add
    // and 38 one-fragment moves) and BL R -46 back to the head.
    pc = P_LOOP;
    loop_head = pc;
    emit('{F(0,0,OP_CMP,2,MX,0,SW(0,0,0,0)), F(0,0,OP_SRC,0,0,0,SW(2,2,2,2)),
           F(1,1,OP_ADD,0,MX,0,SW(1,1,1,1))});
    emit('{F(0,0,OP_PRED,int'(PC_GE),0,2,SW(0,0,0,0)), FI(1,1,OP_BLR,0,0,41)});
    body = pc;
    emit('{F(0,0,OP_ADD,1,MX,1), F(1,0,OP_SRC,0,0,0)});
    for (int i = 0; i < 38; i++) emit('{F(1,0,OP_MOV,4,MY,0,SW(0,0,0,0))});
    back = pc;
    emit('{FI(1,1,OP_BLR,0,0,-46)});
    loop_exit = pc;
    emit('{FI(1,1,OP_HALT)});
    if (back - body != 40 || back - loop_head != 45)
      $fatal(1, "loop layout differs from the published one");
  endtask

  // ------------------------------------------------------------ helpers
  int ret_cnt = 0;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (retire_valid) ret_cnt++;
  end

  function automatic bit near(logic [31:0] got, real e);
    real d;
    d = rl(got) - e;
    return d < 0.0001 && d > -0.0001;
  endfunction

  task automatic set_reg(int r, vec4_t v);
    host_we = 1; host_tid = '0; host_reg = REGW'(r); host_wdata = v;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic expect_reg(int r, real e [4], string nm);
    host_tid = '0; host_reg = REGW'(r);
    #1;
    for (int c = 0; c < 4; c++)
      chk(near(host_rdata[c], e[c]),
          $sformatf("%s r%0d lane %0d: got %f expected %f", nm, r, c, rl(host_rdata[c]), e[c]));
  endtask

  // Runs thread 0 from pc0 until it halts; returns instructions without HALT.
  task automatic run(int pc0, output int n, output int cycles);
    int c0;
    ret_cnt = 0;
    c0 = cyc;
    start = 1; start_mask = 8'h01; start_pc = PCW'(pc0);
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    n = ret_cnt - 1;
    cycles = cyc - c0;
  endtask

  task automatic report(string nm, int n, int want, string paper);
    $display("%-40s instructions %4d (expected %4d; published %s)", nm, n, want, paper);
    chk(n == want, $sformatf("%s instruction count %0d, expected %0d", nm, n, want));
  endtask

  initial begin
    int n, cycles;
    real a [4], b [4], m [4], dot;
    build();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      imem_we = 1; imem_waddr = 10'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;

    // DOT4
    a = '{1.5, -2.0, 0.25, 3.0};
    b = '{0.5, 1.25, -4.0, 2.0};
    set_reg(0, v4(a[0], a[1], a[2], a[3]));
    set_reg(1, v4(b[0], b[1], b[2], b[3]));
    set_reg(3, v4(0.0, 0.0, 0.0, 0.0));
    run(P_DOT, n, cycles);
    dot = a[0] * b[0] + a[1] * b[1] + a[2] * b[2] + a[3] * b[3];
    expect_reg(3, '{dot, a[2] * b[2] + a[3] * b[3], 0.0, 0.0}, "DOT4");
    report("DOT4", n, 3, "3 with multi-thread dual phase");

    // Matrix4
    for (int i = 0; i < 4; i++)
      set_reg(4 + i, v4(0.5 * i - 1.0, 0.25 * i, 1.0 - 0.125 * i, 2.0 + i));
    set_reg(8, v4(1.0, -0.5, 2.0, 0.25));
    run(P_MAT, n, cycles);
    b = '{1.0, -0.5, 2.0, 0.25};
    for (int j = 0; j < 4; j++) begin
      m[j] = 0.0;
      for (int i = 0; i < 4; i++) begin
        real col [4];
        col = '{0.5 * i - 1.0, 0.25 * i, 1.0 - 0.125 * i, 2.0 + i};
        m[j] += col[j] * b[i];
      end
    end
    expect_reg(9, m, "Matrix4");
    report("Matrix4", n, 5, "6 with dual phase");

    // Conditional indirect branch, taken and not taken
    set_reg(15, v4(1.0, 2.0, 0.0, 0.0));
    set_reg(12, v4(-1.0, real'(P_BR_T), 0.0, 0.0));
    set_reg(14, v4(0.0, 0.0, 0.0, 0.0));
    run(P_BR, n, cycles);
    expect_reg(14, '{2.0, 0.0, 0.0, 0.0}, "branch taken");
    report("Conditional indirect branch, taken", n, 2, "2");
    set_reg(12, v4(1.0, real'(P_BR_T), 0.0, 0.0));
    run(P_BR, n, cycles);
    expect_reg(14, '{1.0, 0.0, 0.0, 0.0}, "branch not taken");
    report("Conditional indirect branch, not taken", n, 2, "2");

    // Nested call and return
    set_reg(13, v4(0.0, 0.0, 0.0, 0.0));
    run(P_CALL, n, cycles);
    expect_reg(13, '{0.0, 0.0, 0.0, 0.0}, "call stack empty after return");
    report("Nested call/return (2 levels)", n, 4, "2 per call/return");

    // Counted loop
    set_reg(0, v4(0.0, 1.0, 100.0, 0.0));
    set_reg(4, v4(0.0, 0.0, 0.0, 0.0));
    set_reg(1, v4(0.0, 0.0, 0.0, 0.0));
    run(P_LOOP, n, cycles);
    expect_reg(1, '{5050.0, 0.0, 0.0, 0.0}, "loop sum");
    expect_reg(0, '{101.0, 1.0, 100.0, 0.0}, "loop counter");
    report("Loop, 100 iterations", n, 42 * 100 + 2, "no extra instruction penalty");
    expect_reg(4, '{0.0, 100.0, 0.0, 0.0}, "loop body moves");
    $display("loop took %0d cycles on one thread (one issue slot in %0d)", cycles, N);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
