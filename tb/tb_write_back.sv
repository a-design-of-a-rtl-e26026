// tb_write_back: write enables for legal, illegal and predicated-off
// instructions, and phase #1 priority when both phases write one register.
module tb_write_back;
  import gpu_pkg::*;
  logic valid, illegal, exec1;
  logic [2:0] tid;
  logic [1:0][REGW-1:0] dst;
  logic [1:0][3:0] wmask;
  vec4_t [1:0] res;
  logic [1:0] wr_en;
  logic [1:0][2:0] wr_tid;
  logic [1:0][REGW-1:0] wr_reg;
  logic [1:0][3:0] wr_mask;
  vec4_t [1:0] wr_data;
  int checks = 0, failures = 0;

  write_back #(.NTHREADS(8)) dut (.*);

  initial begin
    repeat (1000) begin
      logic [3:0] m0;
      logic e0, e1;
      valid = 1'($urandom); illegal = ($urandom_range(3) == 0); exec1 = 1'($urandom);
      tid = 3'($urandom);
      dst[0] = 4'($urandom_range(3)); dst[1] = 4'($urandom_range(3));
      wmask[0] = 4'($urandom); wmask[1] = 4'($urandom);
      res[0] = {$urandom, $urandom, $urandom, $urandom};
      res[1] = {$urandom, $urandom, $urandom, $urandom};
      #1;
      e1 = valid && exec1 && wmask[1] != 0;
      m0 = (e1 && dst[0] == dst[1]) ? wmask[0] & ~wmask[1] : wmask[0];
      e0 = valid && !illegal && m0 != 0;
      checks++;
      if (wr_en != {e1, e0} || (e0 && (wr_mask[0] != m0 || wr_reg[0] != dst[0] ||
          wr_data[0] != res[0] || wr_tid[0] != tid)) ||
          (e1 && (wr_mask[1] != wmask[1] || wr_reg[1] != dst[1] || wr_data[1] != res[1] ||
          wr_tid[1] != tid))) begin
        failures++;
        $display("FAIL: en %b exp %b%b", wr_en, e1, e0);
      end
    end
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
