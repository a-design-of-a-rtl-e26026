// tb_pre_coordinate: builds instructions with the decoder and checks the
// per-lane micro-operations, destination masks, move and return-PC values,
// and which phase's operands reach each lane of the shared adder,
// comparator, multiplier and scalar units.
module tb_pre_coordinate;
  import gpu_pkg::*;
  import gpu_asm_pkg::*;
  logic [MAXFRAG-1:0][31:0] frag;
  logic [2:0] len;
  phase_t [1:0] ph;
  logic fmt_err;
  vec4_t [1:0][1:0] val;
  logic [PCW-1:0] ret_pc;
  lane_ops_t [1:0] lops;
  logic [1:0][REGW-1:0] dst;
  logic [1:0][3:0] wmask;
  vec4_t [1:0] mov_val;
  vec4_t add_a, add_b, mul_a, mul_b;
  logic [3:0] mul_sat;
  vec4_t cmp_a, cmp_b;
  word_t rcp_in, rsq_in;
  int checks = 0, failures = 0;

  vliw_decoder   u_dec (.frag, .len, .ph, .fmt_err);
  pre_coordinate dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // distinct slot values: lane c of [p][k] = 1000*p + 100*k + c
    for (int p = 0; p < 2; p++)
      for (int k = 0; k < 2; k++)
        for (int c = 0; c < 4; c++) val[p][k][c] = 32'(1000 * p + 100 * k + c);
    ret_pc = 16'd37;

    // phase0: MUL A.xyzw B, MOVy C  | phase1: ADD D E, RCPw F
    frag = {F(1,1,OP_RCP,0,MW,5), F(0,1,OP_ADD,3,MALL,4), F(0,0,OP_MOV,0,MY,2), F(0,0,OP_MUL,0,MALL,1)};
    #1;
    chk(lops[0] == {L_MUL, L_MUL, L_MOV, L_MUL}, "phase0 lane ops mul.xzw mov.y");
    chk(lops[1] == {L_RCP, L_ADD, L_ADD, L_ADD}, "phase1 lane ops add.xyz rcp.w");
    chk(wmask[0] == 4'hF && wmask[1] == 4'hF && dst[0] == 0 && dst[1] == 3, "dst / masks");
    chk(mov_val[0][1] == val[0][1][1], "MOV.y takes second source lane y");
    for (int c = 0; c < 4; c++) begin
      if (c != 1) chk(mul_a[c] == val[0][0][c] && mul_b[c] == val[0][1][c] && !mul_sat[c],
                      $sformatf("multiplier lane %0d from phase 0", c));
      if (c != 3) chk(add_a[c] == val[1][0][c] && add_b[c] == val[1][1][c],
                      $sformatf("adder lane %0d from phase 1", c));
    end
    chk(rcp_in == val[1][1][3], "rcp gets phase1 second source lane w");

    // phase0: CMP.x, MULS.y | phase1: RSQ.z primary (unary first source)
    frag = {32'h0, F(1,1,OP_RSQ,6,MZ,7), F(0,0,OP_MULS,0,MY,2), F(0,0,OP_CMP,1,MX,1)};
    #1;
    chk(lops[0][0] == L_CMP && lops[0][1] == L_MULS && wmask[0] == 4'b0011, "cmp.x muls.y");
    chk(cmp_a[0] == val[0][0][0] && cmp_b[0] == val[0][1][0] && add_a[0] == 0, "compare uses the comparator lane");
    chk(mul_sat[1] && mul_a[1] == val[0][0][1] && mul_b[1] == val[0][1][1], "saturating multiplier lane");
    chk(lops[1][2] == L_RSQ && rsq_in == val[1][0][2] && dst[1] == 6, "rsq.z from primary source");

    // phase0: MOV A.xyz, MVS A.w (return PC) | phase1: load
    frag = {32'h0, FI(1,1,OP_LD,9,MX|MY,4), F(0,0,OP_MVS,0,MW,0), F(0,0,OP_MOV,0,MX|MY|MZ,3)};
    #1;
    chk(lops[0] == {L_PC, L_MOV, L_MOV, L_MOV}, "mov.xyz + mvs.w");
    chk(mov_val[0][3] == fx_from_int(16'd37), "MVS lane holds return PC");
    chk(mov_val[0][0] == val[0][0][0] && mov_val[0][2] == val[0][0][2], "MOV lanes take first source");
    chk(lops[1] == {L_NONE, L_NONE, L_LD, L_LD} && dst[1] == 9 && wmask[1] == 4'b0011, "load lanes");

    // nothing to do: PRED + ADDR | branch
    frag = {32'h0, FI(1,1,OP_BLD,0,0,85), F(0,0,OP_ADDR,0,0,2), F(0,0,OP_PRED,int'(PC_Z),0,1)};
    #1;
    chk(wmask[0] == 0 && wmask[1] == 0, "coordination and branch write nothing");
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
