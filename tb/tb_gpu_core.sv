// tb_gpu_core: end-to-end test of the core at its default size (8 threads).
// All eight threads run one shader program on their own data: a 4-lane dot
// product (3 instructions), a 4x4 matrix times vector (5 instructions, the
// phase #1 adds overlapping the phase #0 multiplies), a four-fragment
// instruction mixing a multiply with a lane move and an add with a scalar
// reciprocal, compare and saturated multiply, a predicated phase #1 add, an
// instruction that breaks the pairing rules, a compare-branch through an
// ADDR base, a nested call/return (call stack kept in a register), an
// indexed operand, and a store followed by a load. Final registers and
// memory are compared with values the testbench computes from the inputs
// with real arithmetic (inputs are exact binary fractions). It also checks
// the issue rhythm (each thread retires exactly once every 8 cycles), the
// instruction count of every thread, and counts every mechanism.
module tb_gpu_core;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ program
  logic [31:0] prog [1024];
  int pc = 0;
  task automatic emit(input logic [31:0] f [$]);
    foreach (f[i]) begin prog[pc] = f[i]; pc++; end
  endtask
  function automatic void call_frags(int target, ref logic [31:0] q [$]);
    q = '{F(0,0,OP_MOV,13,MY|MZ|MW,13,SW(0,0,1,2)), F(0,0,OP_MVS,13,MX,0),
          FI(1,1,OP_BLD,0,0,target)};
  endfunction
  localparam int TAKEN_AT = 150, F1_AT = 200, F2_AT = 220;
  int join_pc;

  task automatic build();
    logic [31:0] q [$];
    foreach (prog[i]) prog[i] = FI(1,1,OP_HALT);
    pc = 0;
    // DOT4: r3.x = dot(r0, r1)
    emit('{F(0,0,OP_MUL,2,MALL,0), F(1,0,OP_SRC,0,0,1)});
    emit('{F(0,0,OP_ADD,3,MX|MY,2,SW(0,2,0,0)), F(1,0,OP_SRC,0,0,2,SW(1,3,0,0))});
    emit('{F(0,0,OP_ADD,3,MX,3,SW(0,0,0,0)), F(1,0,OP_SRC,0,0,3,SW(1,1,1,1))});
    // Matrix4: r9 = [r4 r5 r6 r7] * r8
    emit('{F(0,0,OP_MUL,9,MALL,4), F(1,0,OP_SRC,0,0,8,SW(0,0,0,0))});
    emit('{F(0,0,OP_MUL,10,MALL,5), F(1,0,OP_SRC,0,0,8,SW(1,1,1,1))});
    emit('{F(0,0,OP_MUL,11,MALL,6), F(0,0,OP_SRC,0,0,8,SW(2,2,2,2)),
           F(0,1,OP_ADD,9,MALL,9), F(1,1,OP_SRC,0,0,10)});
    emit('{F(0,0,OP_MUL,10,MALL,7), F(0,0,OP_SRC,0,0,8,SW(3,3,3,3)),
           F(0,1,OP_ADD,9,MALL,9), F(1,1,OP_SRC,0,0,11)});
    emit('{F(0,0,OP_ADD,9,MALL,9), F(1,0,OP_SRC,0,0,10)});
    // MUL r2.xzw r0 r1 + MOV r2.y r1.y | ADD r11.xyz r8 r15 + RCP r11.w r15.w
    emit('{F(0,0,OP_MUL,2,MALL,0), F(0,0,OP_MOV,0,MY,1),
           F(0,1,OP_ADD,11,MX|MY|MZ,8), F(1,1,OP_RCP,0,MW,15)});
    // CMP r10 r0 r1 | MUL_sat r14.y r0.x r15.x
    emit('{F(0,0,OP_CMP,10,MALL,0), F(0,0,OP_SRC,0,0,1),
           F(0,1,OP_MULS,14,MY,0,SW(0,0,0,0)), F(1,1,OP_SRC,0,0,15,SW(0,0,0,0))});
    // PRED Z r12.x | ADD r14.z r15 r15
    emit('{F(0,0,OP_PRED,int'(PC_Z),0,12,SW(0,0,0,0)), F(0,1,OP_ADD,14,MZ,15), F(1,1,OP_SRC,0,0,15)});
    // illegal: both phases use the adder on lane w
    emit('{F(0,0,OP_ADD,14,MW,15), F(0,0,OP_SRC,0,0,15), F(0,1,OP_ADD,14,MW,15), F(1,1,OP_SRC,0,0,15)});
    // if (r12.x < 0) PC = r12.y + TAKEN_AT
    emit('{F(0,0,OP_PRED,int'(PC_N),0,12,SW(0,0,0,0)), F(0,0,OP_ADDR,0,0,12,SW(1,1,1,1)),
           FI(1,1,OP_BLD,0,0,TAKEN_AT)});
    emit('{F(1,0,OP_MOV,14,MX,15,SW(0,0,0,0))});          // not taken: r14.x = 1
    join_pc = pc;
    call_frags(F1_AT, q); emit(q);                        // call f1
    // ADD r0, r4[r12.w], r15
    emit('{F(0,0,OP_ADDR,0,0,12,SW(3,3,3,3)), F(0,1,OP_ADD,0,MALL,4,SW(0,1,2,3),0,1),
           F(1,1,OP_SRC,0,0,15)});
    emit('{F(0,0,OP_ADDR,0,0,12,SW(2,2,2,2)), FI(1,1,OP_ST,3,MALL,16)});
    emit('{F(0,0,OP_ADDR,0,0,12,SW(2,2,2,2)), FI(1,1,OP_LD,12,MALL,16)});
    emit('{FI(1,1,OP_HALT)});
    // taken path
    pc = TAKEN_AT;
    emit('{F(1,0,OP_MOV,14,MX,15,SW(1,1,1,1))});          // r14.x = 2
    emit('{FI(1,1,OP_BLD,0,0,join_pc)});
    // f1: r8.x = 1; call f2; r8.z = r8.y; return
    pc = F1_AT;
    emit('{F(1,0,OP_MOV,8,MX,15)});
    call_frags(F2_AT, q); emit(q);
    emit('{F(1,0,OP_MOV,8,MZ,8,SW(1,1,1,1))});
    emit('{F(0,0,OP_MOV,13,MX|MY|MZ,13,SW(1,2,3,3)), F(0,0,OP_ADDR,0,0,13,SW(0,0,0,0)),
           FI(1,1,OP_BLD,0,0,0)});
    // f2: r8.y = 2; return
    pc = F2_AT;
    emit('{F(1,0,OP_MOV,8,MY,15)});
    emit('{F(0,0,OP_MOV,13,MX|MY|MZ,13,SW(1,2,3,3)), F(0,0,OP_ADDR,0,0,13,SW(0,0,0,0)),
           FI(1,1,OP_BLD,0,0,0)});
  endtask

  // ------------------------------------------------------------ data
  real in_r [N][NREGS][4];
  function automatic real test_val(int t);
    return (t % 3 == 0) ? 0.0 : (t % 3 == 1) ? -1.0 : 1.0;
  endfunction
  task automatic make_inputs();
    for (int t = 0; t < N; t++) begin
      for (int r = 0; r < NREGS; r++) for (int c = 0; c < 4; c++) in_r[t][r][c] = 0.0;
      in_r[t][0] = '{(t - 2) * 0.5, -0.25 * t, 1.5, 0.75 - 0.25 * t};
      in_r[t][1] = '{2.0 - 0.5 * t, 0.25 * (t + 1), -1.0, 0.5};
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) in_r[t][4 + i][j] = 0.25 * (i + 1) * (j - 1) + 0.125 * t;
      in_r[t][8]  = '{1.0, -0.5, 0.25 * t, 2.0};
      in_r[t][12] = '{test_val(t), 0.0, real'(t), real'(t % 4)};
      in_r[t][15] = '{1.0, 2.0, 3.0, 4.0};
    end
  endtask

  // ------------------------------------------------------------ monitors
  int ret_cnt [N];
  int last_ret [N];
  int n_dual = 0, n_taken = 0, n_pred_off = 0, n_illegal = 0, n_mem = 0, n_len4 = 0;
  int n_rhythm_bad = 0, n_all_active = 0, cyc = 0, first_ret = -1, last_any = 0, total_ret = 0;
  always @(posedge clk) begin
    cyc++;
    if (active == '1) n_all_active++;
    if (retire_valid) begin
      if (first_ret < 0) first_ret = cyc;
      last_any = cyc;
      total_ret++;
      if (last_ret[retire_tid] >= 0 && cyc - last_ret[retire_tid] != N) n_rhythm_bad++;
      last_ret[retire_tid] = cyc;
      ret_cnt[retire_tid]++;
      n_dual     += int'(retire_dual);
      n_taken    += int'(retire_taken);
      n_pred_off += int'(retire_pred_off);
      n_illegal  += int'(retire_illegal);
      n_mem      += int'(retire_mem);
      n_len4     += int'(retire_len == 3'd4);
    end
  end

  function automatic bit near(logic [31:0] got, real e);
    real d;
    d = rl(got) - e;
    return d < 0.0001 && d > -0.0001;
  endfunction

  task automatic expect_reg(int t, int r, real e [4], string nm);
    host_tid = 3'(t); host_reg = REGW'(r);
    #1;
    for (int c = 0; c < 4; c++)
      chk(near(host_rdata[c], e[c]),
          $sformatf("thread %0d %s r%0d lane %0d: got %f expected %f", t, nm, r, c,
                    rl(host_rdata[c]), e[c]));
  endtask

  initial begin
    for (int t = 0; t < N; t++) begin ret_cnt[t] = 0; last_ret[t] = -1; end
    build();
    make_inputs();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load program and registers
    for (int a = 0; a < 1024; a++) begin
      imem_we = 1; imem_waddr = 10'(a); imem_wdata = prog[a];
      @(negedge clk);
    end
    imem_we = 0;
    for (int t = 0; t < N; t++)
      for (int r = 0; r < NREGS; r++) begin
        host_we = 1; host_tid = 3'(t); host_reg = REGW'(r);
        host_wdata = v4(in_r[t][r][0], in_r[t][r][1], in_r[t][r][2], in_r[t][r][3]);
        @(negedge clk);
      end
    host_we = 0;
    start = 1; start_mask = '1; start_pc = '0;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);

    // ---------------------------------------------------------- results
    for (int t = 0; t < N; t++) begin
      real a [4], b [4], p [4], m [4], v [4], k [4], e [4], dot;
      bit taken;
      a = in_r[t][0]; b = in_r[t][1]; v = in_r[t][8]; k = in_r[t][15];
      taken = test_val(t) < 0;
      for (int c = 0; c < 4; c++) p[c] = a[c] * b[c];
      dot = p[0] + p[1] + p[2] + p[3];
      expect_reg(t, 3, '{dot, p[2] + p[3], 0.0, 0.0}, "DOT4");
      for (int j = 0; j < 4; j++) begin
        m[j] = 0.0;
        for (int i = 0; i < 4; i++) m[j] += in_r[t][4 + i][j] * v[i];
      end
      expect_reg(t, 9, m, "Matrix4");
      expect_reg(t, 2, '{p[0], b[1], p[2], p[3]}, "mul+mov lanes");
      expect_reg(t, 11, '{v[0] + k[0], v[1] + k[1], v[2] + k[2], 1.0 / k[3]}, "add+rcp lanes");
      for (int c = 0; c < 4; c++) e[c] = (a[c] < b[c]) ? -1.0 : (a[c] == b[c]) ? 0.0 : 1.0;
      expect_reg(t, 10, e, "compare");
      expect_reg(t, 14, '{taken ? 2.0 : 1.0, (a[0] < 0) ? 0.0 : (a[0] > 1) ? 1.0 : a[0],
                          (test_val(t) == 0) ? 6.0 : 0.0, 0.0}, "branch/sat/pred/illegal");
      expect_reg(t, 8, '{1.0, 2.0, 2.0, v[3]}, "nested call bodies");
      expect_reg(t, 13, '{0.0, 0.0, 0.0, 0.0}, "call stack empty");
      for (int c = 0; c < 4; c++) e[c] = in_r[t][4 + (t % 4)][c] + k[c];
      expect_reg(t, 0, e, "indexed operand");
      expect_reg(t, 12, '{dot, p[2] + p[3], 0.0, 0.0}, "store then load");
      expect_reg(t, 1, b, "input kept");
      chk(u_dmem.mem[16 + t][0] == fx(dot), $sformatf("thread %0d dot in data memory", t));
      chk(ret_cnt[t] == (taken ? 26 : 25),
          $sformatf("thread %0d executed %0d instructions", t, ret_cnt[t]));
    end
    chk(active == '0, "all threads halted");
    chk(n_rhythm_bad == 0, "each thread retires once every 8 cycles");
    chk(last_any - first_ret + 1 <= 26 * N, "8 threads share the pipeline without stalls");
    $display("instructions %0d in %0d cycles; dual-phase writes %0d, taken branches %0d,",
             total_ret, last_any - first_ret + 1, n_dual, n_taken);
    $display("predicated-off %0d, illegal %0d, memory %0d, 4-fragment %0d, all-8-active cycles %0d",
             n_pred_off, n_illegal, n_mem, n_len4, n_all_active);
    chk(n_dual > 0, "dual-phase write-back happened");
    chk(n_taken > 0, "taken branch happened");
    chk(n_pred_off > 0, "predicate disabled phase #1");
    chk(n_illegal == N, "pairing-rule violation detected in every thread");
    chk(n_mem == 2 * N, "loads and stores");
    chk(n_len4 > 0, "four-fragment instruction");
    chk(n_all_active > 0, "all eight threads active together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
