// pre_coordinate: places the micro-operations of both phases onto the
// shared ALU lanes before execution.
//
// For each phase it works out, lane by lane, which micro-operation the lane
// performs (the primary's operation on its write mask, replaced on the
// secondary's mask by the secondary's override operation, e.g. "MUL A.xzw, B,
// C" with "MOV A.y, C.y" in one phase) and its operands: binary operations
// take the first source (primary slot) and the second source (secondary
// slot); a unary primary takes the first source, a unary override the second.
// Each lane of the 4-lane adder, comparator and multiplier is then given to
// the phase that uses it (the pairing rules guarantee at most one), and the scalar
// reciprocal / reciprocal square root units get the one lane that needs
// them. Move lanes need no unit; their value is passed on directly, and MVS
// lanes get the return PC. The document gives the stage its name and place
// (between operand fetch and the ALUs); this lane-level routing is this
// design's construction of it.
//
// Purely combinational.
module pre_coordinate
  import gpu_pkg::*;
(
  input  phase_t [1:0]            ph,
  input  vec4_t  [1:0][1:0]       val,      // [phase][slot]
  input  logic   [PCW-1:0]        ret_pc,   // PC of the next instruction
  output lane_ops_t [1:0]         lops,
  output logic   [1:0][REGW-1:0]  dst,
  output logic   [1:0][3:0]       wmask,
  output vec4_t  [1:0]            mov_val,  // MOV / MVS lane values
  output vec4_t                   add_a, add_b,
  output vec4_t                   cmp_a, cmp_b,
  output vec4_t                   mul_a, mul_b,
  output logic   [3:0]            mul_sat,
  output word_t                   rcp_in,
  output word_t                   rsq_in
);
  always_comb begin
    vec4_t     s0 [2];
    vec4_t     s1 [2];
    vec4_t     a  [2];
    vec4_t     b  [2];
    logic [3:0] ovr [2];

    add_a = '0; add_b = '0; cmp_a = '0; cmp_b = '0;
    mul_a = '0; mul_b = '0; mul_sat = '0;
    rcp_in = ONE;
    rsq_in = ONE;

    for (int p = 0; p < 2; p++) begin
      lops[p]    = phase_lane_ops(ph[p]);
      s0[p]      = '0;
      s1[p]      = '0;
      ovr[p]     = '0;
      dst[p]     = '0;
      for (int k = 0; k < 2; k++) begin
        if (ph[p].s[k].kind == K_PRIM) begin
          s0[p]  = val[p][k];
          dst[p] = ph[p].s[k].dst;
        end
        if (ph[p].s[k].kind == K_SEC) begin
          s1[p] = val[p][k];
          if (op2lop(ph[p].s[k].op) != L_NONE && !is_ctrl(ph[p].s[k].op))
            ovr[p] = ph[p].s[k].mask;
        end
      end
      for (int c = 0; c < 4; c++) begin
        wmask[p][c] = lops[p][c] != L_NONE;
        a[p][c] = s0[p][c];
        b[p][c] = s1[p][c];
        if (ovr[p][c] && lops[p][c] inside {L_MOV, L_RCP, L_RSQ})
          a[p][c] = s1[p][c];
        mov_val[p][c] = (lops[p][c] == L_PC) ? fx_from_int(ret_pc) : a[p][c];
      end
    end

    // Lane allocation of the shared units; phase #0 is checked last so that,
    // were the pairing rules broken, phase #0 would keep the unit.
    for (int p = 1; p >= 0; p--)
      for (int c = 0; c < 4; c++) begin
        if (uses_adder(lops[p][c])) begin
          add_a[c]   = a[p][c];
          add_b[c]   = b[p][c];
        end
        if (uses_cmp(lops[p][c])) begin
          cmp_a[c]   = a[p][c];
          cmp_b[c]   = b[p][c];
        end
        if (uses_mul(lops[p][c])) begin
          mul_a[c]   = a[p][c];
          mul_b[c]   = b[p][c];
          mul_sat[c] = lops[p][c] == L_MULS;
        end
        if (lops[p][c] == L_RCP) rcp_in = a[p][c];
        if (lops[p][c] == L_RSQ) rsq_in = a[p][c];
      end
  end

endmodule
