// tb_post_coordinate: random lane micro-operations for both phases; each
// result lane must come from the unit its operation names.
module tb_post_coordinate;
  import gpu_pkg::*;
  lane_ops_t [1:0] lops;
  vec4_t [1:0] mov_val, res;
  vec4_t add_y, cmp_y, mul_y, ld_data;
  word_t rcp_y, rsq_y;
  int checks = 0, failures = 0;

  post_coordinate dut (.*);

  initial begin
    repeat (500) begin
      for (int c = 0; c < 4; c++) begin
        add_y[c] = $urandom; cmp_y[c] = $urandom; mul_y[c] = $urandom; ld_data[c] = $urandom;
        mov_val[0][c] = $urandom; mov_val[1][c] = $urandom;
        lops[0][c] = lop_e'($urandom_range(9)); lops[1][c] = lop_e'($urandom_range(9));
      end
      rcp_y = $urandom; rsq_y = $urandom;
      #1;
      for (int p = 0; p < 2; p++)
        for (int c = 0; c < 4; c++) begin
          logic [31:0] e;
          case (lops[p][c])
            L_MOV, L_PC:   e = mov_val[p][c];
            L_ADD:         e = add_y[c];
            L_CMP:         e = cmp_y[c];
            L_MUL, L_MULS: e = mul_y[c];
            L_RCP:         e = rcp_y;
            L_RSQ:         e = rsq_y;
            L_LD:          e = ld_data[c];
            default:       e = 0;
          endcase
          checks++;
          if (res[p][c] != e) begin
            failures++;
            $display("FAIL phase %0d lane %0d op %0d", p, c, lops[p][c]);
          end
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
