// tb_vliw_decoder: feeds the eight fragment combinations allowed by the
// end/phase bits (one to four fragments, phase #0 first, at most two per
// phase) and checks length, slot placement and roles; then checks format
// errors, coordinate/secondary roles, the implicit second source of a lone
// binary primary, and that fragments after the end bit are ignored.
module tb_vliw_decoder;
  import gpu_pkg::*;
  import gpu_asm_pkg::*;
  logic [MAXFRAG-1:0][31:0] frag;
  logic [2:0]   len;
  phase_t [1:0] ph;
  logic         fmt_err;
  int checks = 0, failures = 0;

  vliw_decoder dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // junk fragment that must never be decoded
  localparam logic [31:0] J = 32'hDEAD_BEEF;

  task automatic combo(string nm, logic [31:0] f0, logic [31:0] f1, logic [31:0] f2,
                       logic [31:0] f3, int elen, int n0, int n1, bit eerr);
    frag = {f3, f2, f1, f0};
    #1;
    chk(len == 3'(elen), $sformatf("%s: len %0d", nm, len));
    chk(fmt_err == eerr, $sformatf("%s: fmt_err %0b", nm, fmt_err));
    if (!eerr) begin
      int c0, c1;
      c0 = 0; c1 = 0;
      for (int k = 0; k < 2; k++) begin
        c0 += int'(ph[0].s[k].kind != K_NONE);
        c1 += int'(ph[1].s[k].kind != K_NONE);
      end
      chk(c0 == n0 && c1 == n1, $sformatf("%s: fragments per phase %0d/%0d", nm, c0, c1));
    end
  endtask

  initial begin
    // the 8 combination types (MOV keeps each phase free of implicit reads)
    combo("p0",          F(1,0,OP_MOV,1), J, J, J, 1, 1, 0, 0);
    combo("p1",          F(1,1,OP_MOV,1), J, J, J, 1, 0, 1, 0);
    combo("p0 p0",       F(0,0,OP_MOV,1), F(1,0,OP_SRC,0,0,2), J, J, 2, 2, 0, 0);
    combo("p0 p1",       F(0,0,OP_MOV,1), F(1,1,OP_MOV,2), J, J, 2, 1, 1, 0);
    combo("p1 p1",       F(0,1,OP_MOV,1), F(1,1,OP_SRC,0,0,3), J, J, 2, 0, 2, 0);
    combo("p0 p0 p1",    F(0,0,OP_MOV,1), F(0,0,OP_SRC,0,0,2), F(1,1,OP_MOV,3), J, 3, 2, 1, 0);
    combo("p0 p1 p1",    F(0,0,OP_MOV,1), F(0,1,OP_MOV,2), F(1,1,OP_SRC,0,0,3), J, 3, 1, 2, 0);
    combo("p0 p0 p1 p1", F(0,0,OP_MOV,1), F(0,0,OP_SRC,0,0,2), F(0,1,OP_MOV,3),
                         F(0,1,OP_SRC,0,0,4), 4, 2, 2, 0);
    // illegal orders
    combo("p1 p0",       F(0,1,OP_MOV,1), F(1,0,OP_MOV,2), J, J, 2, 0, 0, 1);
    combo("p0 p0 p0",    F(0,0,OP_MOV,1), F(0,0,OP_SRC,0,0,2), F(1,0,OP_MOV,3), J, 3, 0, 0, 1);

    // Fig.-10 style example 3: ADDR D.w | ADD A, B[D.w], C
    frag = {J, F(1,1,OP_SRC,0,0,2), F(0,1,OP_ADD,0,MALL,1,SW(0,1,2,3),0,1),
            F(0,0,OP_ADDR,0,0,3,SW(3,3,3,3))};
    #1;
    chk(len == 3 && !fmt_err, "ex3 length");
    chk(ph[0].s[0].kind == K_ADDR && ph[0].s[0].src.r == 3 && ph[0].s[0].src.swz == SW(3,3,3,3),
        "ex3 ADDR slot");
    chk(ph[1].s[0].kind == K_PRIM && ph[1].s[0].op == OP_ADD && ph[1].s[0].dst == 0 &&
        ph[1].s[0].src.r == 1 && ph[1].s[0].src.idx, "ex3 primary ADD with indexed source");
    chk(ph[1].s[1].kind == K_SEC && ph[1].s[1].src.r == 2 && ph[1].s[1].rd, "ex3 secondary source");

    // lone binary primary reads its destination as second source
    frag = {J, J, J, F(1,0,OP_MULS,5,MALL,6)};
    #1;
    chk(len == 1 && !fmt_err, "MUL_sat single fragment");
    chk(ph[0].s[0].kind == K_PRIM && ph[0].s[0].op == OP_MULS, "MUL_sat primary");
    chk(ph[0].s[1].kind == K_SEC && ph[0].s[1].op == OP_SRC && ph[0].s[1].src.r == 5 &&
        ph[0].s[1].src.swz == SWZ_IDENT && ph[0].s[1].rd, "implicit second source = dst");

    // override: MUL A.xzw B, MOVy C
    frag = {J, J, F(1,0,OP_MOV,0,MY,2), F(0,0,OP_MUL,1,MALL,3)};
    #1;
    chk(ph[0].s[1].kind == K_SEC && ph[0].s[1].op == OP_MOV && ph[0].s[1].mask == 4'(MY),
        "second non-coordinate fragment is secondary override");

    // coordinate + binary primary leaves no read slot for the implicit source
    frag = {J, J, F(1,0,OP_ADD,1,MALL,2), F(0,0,OP_PRED,int'(PC_Z),0,3)};
    #1;
    chk(fmt_err, "no free slot for the implicit source");

    // immediate format: branch and store
    frag = {J, J, FI(1,1,OP_BLR,0,0,-46), F(0,0,OP_MOV,1)};
    #1;
    chk(ph[1].s[0].kind == K_PRIM && ph[1].s[0].op == OP_BLR && $signed(ph[1].s[0].imm) == -46 &&
        !ph[1].s[0].rd, "branch immediate");
    frag = {J, J, J, FI(1,1,OP_ST,7,MX,12)};
    #1;
    chk(ph[1].s[0].rd && ph[1].s[0].src.r == 7 && ph[1].s[0].imm == 12, "store reads data register");

    // no end bit: four fragments
    frag = {F(0,1,OP_SRC,0,0,1), F(0,1,OP_ADD,2,MALL,3), F(0,0,OP_SRC,0,0,4), F(0,0,OP_MUL,5,MALL,6)};
    #1;
    chk(len == 4 && !fmt_err, "four fragments without end bit");

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
