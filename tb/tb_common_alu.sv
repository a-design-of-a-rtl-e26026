// tb_common_alu: random operands against reference values computed with
// 64-bit integer and real arithmetic in the testbench: add, compare, plain
// and saturated multiply, reciprocal and reciprocal square root (within a
// small error bound of the rounded real result).
module tb_common_alu;
  import gpu_pkg::*;
  import gpu_asm_pkg::*;
  vec4_t add_a, add_b, cmp_a, cmp_b, mul_a, mul_b;
  logic [3:0] mul_sat;
  word_t rcp_in, rsq_in;
  vec4_t add_y, cmp_y, mul_y;
  word_t rcp_y, rsq_y;
  int checks = 0, failures = 0;

  common_alu dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int rnd_fx();
    return $signed($urandom) >>> $urandom_range(4, 16);
  endfunction

  initial begin
    repeat (2000) begin
      for (int c = 0; c < 4; c++) begin
        add_a[c] = rnd_fx(); add_b[c] = rnd_fx(); cmp_a[c] = rnd_fx(); cmp_b[c] = rnd_fx();
        mul_a[c] = rnd_fx(); mul_b[c] = rnd_fx(); mul_sat[c] = 1'($urandom);
        if ($urandom_range(7) == 0) cmp_b[c] = cmp_a[c];
      end
      rcp_in = $signed($urandom_range(32'h7FFF_FFFF)) >>> $urandom_range(0, 20);
      if ($urandom_range(1) == 1) rcp_in = -rcp_in;
      rsq_in = $signed($urandom_range(32'h7FFF_FFFF)) >>> $urandom_range(0, 20);
      #1;
      for (int c = 0; c < 4; c++) begin
        longint a, b, s, m;
        a = longint'($signed(add_a[c])); b = longint'($signed(add_b[c]));
        s = a + b;
        chk(add_y[c] == 32'(s), "adder lane");
        s = longint'($signed(cmp_a[c])) - longint'($signed(cmp_b[c]));
        chk($signed(cmp_y[c]) == (s < 0 ? -65536 : s == 0 ? 0 : 65536), "compare lane");
        m = (longint'($signed(mul_a[c])) * longint'($signed(mul_b[c]))) >>> 16;
        if (mul_sat[c]) m = (m < 0) ? 0 : (m > 65536) ? 65536 : m;
        chk(mul_y[c] == 32'(m), "multiplier lane");
      end
      if (rcp_in != 0) begin
        real e;
        e = 65536.0 / rl(rcp_in);
        if (e < 2147483647.0 && e > -2147483648.0)
          chk($itor($signed(rcp_y)) - e < 1.001 && e - $itor($signed(rcp_y)) < 1.001,
              $sformatf("rcp(%f) = %f", rl(rcp_in), rl(rcp_y)));
      end
      if (rsq_in > 0) begin
        real e;
        e = 65536.0 / $sqrt(rl(rsq_in));
        if (e < 2147483647.0)
          chk($itor($signed(rsq_y)) - e < 2.0 + e / 16384.0 &&
              e - $itor($signed(rsq_y)) < 2.0 + e / 16384.0,
              $sformatf("rsq(%f) = %f", rl(rsq_in), rl(rsq_y)));
      end
    end
    // exact points
    rcp_in = fx(4.0); rsq_in = fx(4.0); #1;
    chk(rcp_y == fx(0.25) && rsq_y == fx(0.5), "rcp(4) = 0.25, rsq(4) = 0.5");
    rcp_in = 0; rsq_in = fx(-1.0); #1;
    chk(rcp_y == 32'h7FFF_FFFF && rsq_y == 32'h7FFF_FFFF, "rcp(0), rsq(<0) = max");
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
