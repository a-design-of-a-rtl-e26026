// tb_instr_mem: fills the memory with a known pattern and checks that every
// address returns its own fragment and the three that follow it (with
// wrap-around), one cycle after the address.
module tb_instr_mem;
  import gpu_pkg::*;
  localparam int D = 64;
  logic clk = 0;
  logic we = 0;
  logic [5:0] waddr = '0, rd_addr = '0;
  logic [31:0] wdata = '0;
  logic [MAXFRAG-1:0][31:0] rd_frag;
  int checks = 0, failures = 0;

  instr_mem #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] pat(int a);
    return 32'(a) * 32'h9E37_79B1 ^ 32'h5A5A_0000;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < D; a++) begin
      we = 1; waddr = 6'(a); wdata = pat(a);
      @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < D; a++) begin
      rd_addr = 6'(a);
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (rd_frag[k] != pat((a + k) % D)) begin
          failures++;
          $display("FAIL addr %0d frag %0d: %h", a, k, rd_frag[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
