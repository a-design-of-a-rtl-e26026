// tb_thread_scheduler: checks the fixed round-robin slot order, that only
// started threads issue, that every running thread issues exactly once per
// NTHREADS cycles, that PC updates and halts land in the status registers,
// and that a restart overrides them.
module tb_thread_scheduler;
  import gpu_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [N-1:0] start_mask = '0;
  logic [PCW-1:0] start_pc = '0;
  logic upd_valid = 0, upd_halt = 0;
  logic [2:0] upd_tid = '0;
  logic [PCW-1:0] upd_pc = '0;
  logic issue_valid;
  logic [2:0] issue_tid;
  logic [PCW-1:0] issue_pc;
  logic [N-1:0] active;
  int checks = 0, failures = 0;

  thread_scheduler #(.NTHREADS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PCW-1:0] exp_pc [N];
  logic [N-1:0]   exp_act;
  int             last_issue [N];
  int             cyc = 0;

  initial begin
    for (int t = 0; t < N; t++) begin exp_pc[t] = '0; last_issue[t] = -1; end
    exp_act = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(active == '0, "no thread active after reset");
    start = 1; start_mask = 8'b1010_0101; start_pc = 16'd5;
    @(negedge clk);
    start = 0;
    exp_act = 8'b1010_0101;
    for (int t = 0; t < N; t++) if (exp_act[t]) exp_pc[t] = 16'd5;
    // 40 cycles of observation, with an update on thread 2 and a halt on 0.
    for (int i = 0; i < 40; i++) begin
      chk(issue_valid == exp_act[issue_tid], "issue_valid follows active");
      chk(active == exp_act, "status register active");
      if (issue_valid) begin
        chk(issue_pc == exp_pc[issue_tid], $sformatf("pc of thread %0d", issue_tid));
        if (last_issue[issue_tid] >= 0)
          chk(cyc - last_issue[issue_tid] == N, "one issue per N cycles");
        last_issue[issue_tid] = cyc;
      end
      upd_valid = 0; upd_halt = 0;
      if (i == 10) begin upd_valid = 1; upd_tid = 2; upd_pc = 16'd77; end
      if (i == 20) begin upd_valid = 1; upd_tid = 0; upd_pc = 16'd9; upd_halt = 1; end
      @(negedge clk);
      cyc++;
      if (i == 10) exp_pc[2] = 16'd77;
      if (i == 20) begin exp_pc[0] = 16'd9; exp_act[0] = 1'b0; last_issue[0] = -1; end
    end
    upd_valid = 0; upd_halt = 0;
    // consecutive slots
    begin
      logic [2:0] t0;
      t0 = issue_tid;
      for (int i = 1; i <= 2 * N; i++) begin
        @(negedge clk);
        chk(issue_tid == 3'(t0 + i), "round-robin slot sequence");
      end
    end
    // restart overrides
    start = 1; start_mask = 8'b0000_0011; start_pc = 16'd100;
    @(negedge clk);
    start = 0;
    chk(active == 8'b1010_0111, "restart sets active bits");
    while (issue_tid != 0) @(negedge clk);
    chk(issue_valid && issue_pc == 16'd100, "restarted thread 0 at new pc");
    @(negedge clk);
    chk(issue_valid && issue_pc == 16'd100, "restarted thread 1 at new pc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
