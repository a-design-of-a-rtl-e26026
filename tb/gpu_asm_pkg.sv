// gpu_asm_pkg: small assembler for testbenches. Builds 32-bit instruction
// fragments in the core's format (E, P, opcode, operand field) and converts
// between reals and the 16.16 fixed-point lanes.
package gpu_asm_pkg;
  import gpu_pkg::*;

  // Swizzle: source lane for result lanes x, y, z, w.
  function automatic logic [7:0] SW(int x, int y, int z, int w);
    return {2'(w), 2'(z), 2'(y), 2'(x)};
  endfunction

  // Register-format fragment.
  function automatic logic [31:0] F(bit e, bit p, opcode_e op, int dst = 0,
                                    int mask = 15, int src = 0,
                                    logic [7:0] swz = 8'hE4, bit neg = 0,
                                    bit idx = 0);
    return {e, p, op, 4'(dst), 4'(mask), 4'(src), swz, neg, idx, 2'b00};
  endfunction

  // Immediate-format fragment (branches, memory, halt).
  function automatic logic [31:0] FI(bit e, bit p, opcode_e op, int r = 0,
                                     int mask = 15, int imm = 0);
    return {e, p, op, 4'(r), 4'(mask), 16'(imm)};
  endfunction

  // Lane masks.
  localparam int MX = 1, MY = 2, MZ = 4, MW = 8, MALL = 15;

  function automatic logic [31:0] fx(real r);
    return 32'($rtoi(r * 65536.0 + (r >= 0 ? 0.5 : -0.5)));
  endfunction

  function automatic real rl(logic [31:0] v);
    return $itor($signed(v)) / 65536.0;
  endfunction

  function automatic vec4_t v4(real x, real y, real z, real w);
    vec4_t v;
    v[0] = fx(x); v[1] = fx(y); v[2] = fx(z); v[3] = fx(w);
    return v;
  endfunction

endpackage
