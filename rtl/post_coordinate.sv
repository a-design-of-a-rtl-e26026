// post_coordinate: gathers, after the shared ALUs, the result of each phase
// lane by lane from the unit that lane used (adder, compare, multiplier,
// scalar reciprocal, scalar reciprocal square root, the pass-through value of
// a move or MVS, or the data returned by a phase #1 load). It is the mirror
// of pre_coordinate, and as with it the document gives the stage's name and
// place while the lane selection is this design's construction.
//
// Purely combinational.
module post_coordinate
  import gpu_pkg::*;
(
  input  lane_ops_t [1:0] lops,
  input  vec4_t [1:0]     mov_val,
  input  vec4_t           add_y,
  input  vec4_t           cmp_y,
  input  vec4_t           mul_y,
  input  word_t           rcp_y,
  input  word_t           rsq_y,
  input  vec4_t           ld_data,
  output vec4_t [1:0]     res
);
  always_comb begin
    for (int p = 0; p < 2; p++)
      for (int c = 0; c < 4; c++)
        case (lops[p][c])
          L_MOV, L_PC:  res[p][c] = mov_val[p][c];
          L_ADD:        res[p][c] = add_y[c];
          L_CMP:        res[p][c] = cmp_y[c];
          L_MUL, L_MULS: res[p][c] = mul_y[c];
          L_RCP:        res[p][c] = rcp_y;
          L_RSQ:        res[p][c] = rsq_y;
          L_LD:         res[p][c] = ld_data[c];
          default:      res[p][c] = '0;
        endcase
  end

endmodule
