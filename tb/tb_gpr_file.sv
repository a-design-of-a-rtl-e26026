// tb_gpr_file: loads every register of every thread through the host port,
// reads them back through all four read ports, then checks lane-masked
// writes on both write ports, write-port-1 priority on a shared lane, and
// that threads do not alias.
module tb_gpr_file;
  import gpu_pkg::*;
  localparam int N = 8;
  logic clk = 0;
  logic [3:0][2:0] rd_tid;
  logic [3:0][REGW-1:0] rd_reg;
  vec4_t [3:0] rd_data;
  logic [1:0] wr_en = '0;
  logic [1:0][2:0] wr_tid = '0;
  logic [1:0][REGW-1:0] wr_reg = '0;
  logic [1:0][3:0] wr_mask = '0;
  vec4_t [1:0] wr_data = '0;
  logic host_we = 0;
  logic [2:0] host_tid = '0;
  logic [REGW-1:0] host_reg = '0;
  vec4_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;
  vec4_t model [N][NREGS];

  gpr_file #(.NTHREADS(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int t = 0; t < N; t++)
      for (int r = 0; r < NREGS; r++) begin
        for (int c = 0; c < 4; c++) model[t][r][c] = $urandom;
        host_we = 1; host_tid = 3'(t); host_reg = REGW'(r); host_wdata = model[t][r];
        @(negedge clk);
      end
    host_we = 0;
    repeat (200) begin
      for (int i = 0; i < 4; i++) begin
        rd_tid[i] = 3'($urandom_range(N - 1));
        rd_reg[i] = REGW'($urandom_range(NREGS - 1));
      end
      #1;
      for (int i = 0; i < 4; i++)
        chk(rd_data[i] == model[rd_tid[i]][rd_reg[i]], $sformatf("read port %0d", i));
      @(negedge clk);
    end
    // random masked writes on both ports
    repeat (300) begin
      for (int p = 0; p < 2; p++) begin
        wr_en[p]   = 1'($urandom);
        wr_tid[p]  = 3'($urandom_range(N - 1));
        wr_reg[p]  = REGW'($urandom_range(3));
        wr_mask[p] = 4'($urandom);
        for (int c = 0; c < 4; c++) wr_data[p][c] = $urandom;
      end
      @(negedge clk);
      for (int p = 0; p < 2; p++)
        if (wr_en[p])
          for (int c = 0; c < 4; c++)
            if (wr_mask[p][c]) model[wr_tid[p]][wr_reg[p]][c] = wr_data[p][c];
      wr_en = '0;
      for (int t = 0; t < N; t++)
        for (int r = 0; r < 4; r++) begin
          host_tid = 3'(t); host_reg = REGW'(r);
          #1;
          chk(host_rdata == model[t][r], $sformatf("host read t%0d r%0d after writes", t, r));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
