// pairing_checker: enforces the exclusive pairing rules between the two
// phases of one instruction, which share a single set of ALUs.
//
// Rules taken from the document's pairing table:
//   - the same arithmetic unit may not serve the same lane in both phases
//     (the 4-lane adder, comparator and multiplier are shared lane by lane);
//   - each special function is one scalar unit: reciprocal and reciprocal
//     square root may each serve only one lane per instruction;
//   - moves use no unit and may be duplicated;
//   - branch and memory fragments are allowed only in phase #1;
//   - coordinate fragments (PRED, ADDR) are allowed only in phase #0.
// Added by this design: at most one PRED and one ADDR per instruction, no
// branch/memory fragment in the secondary position, and any format error from
// the decoder also makes the instruction illegal.
//
// Interface: ph = decoded phases, fmt_err from the decoder; illegal = the
// instruction must not execute; why = which rule fired (bit order below).
// Purely combinational.
module pairing_checker
  import gpu_pkg::*;
(
  input  phase_t [1:0] ph,
  input  logic         fmt_err,
  output logic         illegal,
  output logic [7:0]   why     // 0 fmt, 1 adder, 2 mul, 3 rcp, 4 rsq,
                               // 5 ctrl in phase #0 / secondary, 6 coordinate,
                               // 7 comparator
);
  always_comb begin
    lane_ops_t l0, l1;
    int n_rcp, n_rsq, n_pred, n_addr;

    l0 = phase_lane_ops(ph[0]);
    l1 = phase_lane_ops(ph[1]);
    why = '0;
    why[0] = fmt_err;
    n_rcp = 0;
    n_rsq = 0;
    for (int c = 0; c < 4; c++) begin
      if (uses_adder(l0[c]) && uses_adder(l1[c])) why[1] = 1'b1;
      if (uses_mul(l0[c])   && uses_mul(l1[c]))   why[2] = 1'b1;
      if (uses_cmp(l0[c])   && uses_cmp(l1[c]))   why[7] = 1'b1;
      n_rcp += int'(l0[c] == L_RCP) + int'(l1[c] == L_RCP);
      n_rsq += int'(l0[c] == L_RSQ) + int'(l1[c] == L_RSQ);
    end
    why[3] = n_rcp > 1;
    why[4] = n_rsq > 1;

    n_pred = 0;
    n_addr = 0;
    for (int p = 0; p < 2; p++)
      for (int k = 0; k < 2; k++) begin
        if (is_ctrl(ph[p].s[k].op) && ph[p].s[k].kind != K_NONE &&
            (p == 0 || ph[p].s[k].kind == K_SEC)) why[5] = 1'b1;
        if (ph[p].s[k].kind inside {K_PRED, K_ADDR} && p == 1) why[6] = 1'b1;
        n_pred += int'(ph[p].s[k].kind == K_PRED);
        n_addr += int'(ph[p].s[k].kind == K_ADDR);
      end
    if (n_pred > 1 || n_addr > 1) why[6] = 1'b1;
    illegal = |why;
  end

endmodule
