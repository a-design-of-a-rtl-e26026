// vliw_decoder: the instruction-buffer side of the variable-length
// instruction words. It takes the four fragments fetched at the PC, finds
// where the instruction ends and sorts its fragments into phase #0 and
// phase #1, two slots each.
//
// Following the document: an instruction has up to four 32-bit fragments,
// the end bit marks its last fragment, the phase bit says which phase a
// fragment belongs to, phase #0 fragments come before phase #1 fragments and
// a phase holds at most two fragments. This design's own reading: with no end
// bit in the first three fragments the instruction is four fragments long;
// inside a phase PRED and ADDR are coordinate fragments, the first other
// fragment is the primary micro-operation (destination, first source) and
// the next one the secondary (second source, plus an optional per-lane
// override micro-operation). A binary primary without a secondary takes its
// destination register as second source, as in "MUL_sat A, B, A" written
// with a single fragment; that read uses the phase's free slot.
//
// Interface: frag[0..3] in program order; len = fragments used (1..4);
// ph[0], ph[1] = decoded phases; fmt_err = the fragments break these rules.
// Purely combinational.
module vliw_decoder
  import gpu_pkg::*;
(
  input  logic [MAXFRAG-1:0][31:0] frag,
  output logic [2:0]               len,
  output phase_t [1:0]             ph,
  output logic                     fmt_err
);
  always_comb begin
    logic [1:0] cnt [2];
    logic       prim [2];
    logic       seen_p1;
    logic       done;
    frag_t      f;
    reg_field_t rf;
    imm_field_t im;
    slot_t      s;
    logic       has_sec;
    logic       binop;
    logic [REGW-1:0] d;

    s       = '0;
    has_sec = 1'b0;
    binop   = 1'b0;
    d       = '0;
    len     = 3'd4;
    done    = 1'b0;
    rf      = '0;
    im      = '0;
    for (int i = 0; i < MAXFRAG; i++) begin
      f = frag_t'(frag[i]);
      if (!done && f.e) begin
        len  = 3'(i + 1);
        done = 1'b1;
      end
    end

    ph      = '0;
    fmt_err = 1'b0;
    seen_p1 = 1'b0;
    for (int p = 0; p < 2; p++) begin
      cnt[p]  = '0;
      prim[p] = 1'b0;
    end

    for (int i = 0; i < MAXFRAG; i++) begin
      if (3'(i) < len) begin
        f  = frag_t'(frag[i]);
        rf = reg_field_t'(f.operand);
        im = imm_field_t'(f.operand);
        s  = '0;
        s.op   = f.op;
        if (is_imm_fmt(f.op)) begin
          s.dst  = im.reg_;
          s.mask = im.mask;
          s.imm  = im.imm;
          s.src  = '{r: im.reg_, swz: SWZ_IDENT, neg: 1'b0, idx: 1'b0};
          s.rd   = (f.op == OP_ST);
        end else begin
          s.dst  = rf.dst;
          s.mask = rf.mask;
          s.src  = '{r: rf.src, swz: rf.swz, neg: rf.neg, idx: rf.idx};
          s.rd   = !(f.op inside {OP_NOP, OP_MVS});
        end
        if (f.op == OP_NOP)                     s.kind = K_NONE;
        else if (f.op == OP_PRED)               s.kind = K_PRED;
        else if (f.op == OP_ADDR)               s.kind = K_ADDR;
        else if (f.op == OP_SRC || prim[f.p])   s.kind = K_SEC;
        else begin
          s.kind     = K_PRIM;
          prim[f.p]  = 1'b1;
        end
        if (f.p) seen_p1 = 1'b1;
        else if (seen_p1) fmt_err = 1'b1;          // phase #0 after phase #1
        if (cnt[f.p] == 2'd2) fmt_err = 1'b1;      // third fragment in a phase
        else begin
          ph[f.p].s[cnt[f.p][0]] = s;
          cnt[f.p] = cnt[f.p] + 2'd1;
        end
      end
    end

    // Implicit second source (destination register) of a lone binary primary.
    for (int p = 0; p < 2; p++) begin
      has_sec = 1'b0;
      binop   = 1'b0;
      d       = '0;
      for (int k = 0; k < 2; k++) begin
        if (ph[p].s[k].kind == K_SEC) has_sec = 1'b1;
        if (ph[p].s[k].kind == K_PRIM &&
            ph[p].s[k].op inside {OP_ADD, OP_MUL, OP_MULS, OP_CMP}) begin
          binop = 1'b1;
          d     = ph[p].s[k].dst;
        end
      end
      if (binop && !has_sec) begin
        if (cnt[p] == 2'd2) fmt_err = 1'b1;         // no free read slot
        else begin
          ph[p].s[cnt[p][0]].kind = K_SEC;
          ph[p].s[cnt[p][0]].op   = OP_SRC;
          ph[p].s[cnt[p][0]].src  = '{r: d, swz: SWZ_IDENT, neg: 1'b0, idx: 1'b0};
          ph[p].s[cnt[p][0]].rd   = 1'b1;
        end
      end
    end
  end

endmodule
