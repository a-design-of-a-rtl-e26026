// tb_operand_fetch: drives decoded phases against a register model and
// checks read addresses (plain and indexed), swizzle, negation, unused
// slots, and the ADDR / PRED coordination outputs for every condition.
module tb_operand_fetch;
  import gpu_pkg::*;
  import gpu_asm_pkg::*;
  localparam int N = 8;
  phase_t ph;
  logic [2:0] tid;
  logic index_en;
  logic [PCW-1:0] index_in;
  logic [1:0][2:0] rd_tid;
  logic [1:0][REGW-1:0] rd_reg;
  vec4_t [1:0] rd_data;
  vec4_t [1:0] val;
  logic addr_en, pred_en, pred_ok;
  logic [PCW-1:0] addr;
  int checks = 0, failures = 0;
  vec4_t regs [N][NREGS];

  operand_fetch #(.NTHREADS(N)) dut (.*);

  always_comb for (int k = 0; k < 2; k++) rd_data[k] = regs[rd_tid[k]][rd_reg[k]];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic slot_t mk(kind_e k, int dstv, int src, logic [7:0] swz, bit neg, bit idx);
    slot_t s;
    s = '0;
    s.kind = k; s.op = (k == K_PRED) ? OP_PRED : (k == K_ADDR) ? OP_ADDR : OP_ADD;
    s.dst = REGW'(dstv); s.mask = 4'hF; s.rd = (k != K_NONE);
    s.src = '{r: REGW'(src), swz: swz, neg: neg, idx: idx};
    return s;
  endfunction

  initial begin
    for (int t = 0; t < N; t++)
      for (int r = 0; r < NREGS; r++)
        for (int c = 0; c < 4; c++) regs[t][r][c] = 32'($signed($urandom) >>> 4);
    // random swizzle / negate / index
    repeat (300) begin
      logic [7:0] sw [2];
      bit ng [2], ix [2];
      int sr [2];
      tid = 3'($urandom_range(N - 1));
      index_en = 1'($urandom);
      index_in = 16'($urandom_range(40));
      for (int k = 0; k < 2; k++) begin
        sw[k] = 8'($urandom); ng[k] = 1'($urandom); ix[k] = 1'($urandom);
        sr[k] = $urandom_range(NREGS - 1);
        ph.s[k] = mk(K_PRIM, 0, sr[k], sw[k], ng[k], ix[k]);
      end
      #1;
      for (int k = 0; k < 2; k++) begin
        int r;
        r = (ix[k] && index_en) ? (sr[k] + int'(index_in)) % NREGS : sr[k];
        chk(rd_reg[k] == REGW'(r) && rd_tid[k] == tid, "read address");
        for (int c = 0; c < 4; c++) begin
          logic [31:0 ] e;
          e = regs[tid][r][sw[k][2*c +: 2]];
          if (ng[k]) e = -e;
          chk(val[k][c] == e, "swizzled / negated lane");
        end
      end
      chk(!addr_en && !pred_en && pred_ok, "no coordination without PRED/ADDR");
    end
    // ADDR: integer part of lane x after swizzle (D.w)
    tid = 3;
    regs[3][4] = v4(1.0, 2.0, 3.0, 7.75);
    ph.s[0] = mk(K_ADDR, 0, 4, SW(3,3,3,3), 0, 0);
    ph.s[1] = mk(K_NONE, 0, 0, 8'hE4, 0, 0);
    #1;
    chk(addr_en && addr == 16'd7, "ADDR D.w = 7");
    chk(val[1] == '0, "unused slot reads as zero");
    regs[3][4] = v4(-2.5, 0, 0, 0);
    ph.s[0] = mk(K_ADDR, 0, 4, SW(0,0,0,0), 0, 0);
    #1;
    chk(addr == 16'hFFFD, "ADDR floor of -2.5 is -3");
    // PRED: each condition on zero, negative, positive
    begin
      automatic real vals [3] = '{0.0, -1.5, 2.25};
      for (int cond = 0; cond < 6; cond++)
        for (int i = 0; i < 3; i++) begin
          bit e;
          regs[3][5] = v4(0, vals[i], 0, 0);
          ph.s[1] = mk(K_PRED, cond, 5, SW(1,1,1,1), 0, 0);
          #1;
          case (cond)
            0: e = vals[i] == 0;   1: e = vals[i] != 0;
            2: e = vals[i] < 0;    3: e = vals[i] >= 0;
            4: e = vals[i] > 0;    default: e = vals[i] <= 0;
          endcase
          chk(pred_en && pred_ok == e, $sformatf("PRED cond %0d on %f", cond, vals[i]));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
