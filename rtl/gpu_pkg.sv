// gpu_pkg: types, constants and helper functions shared by the dual-phase
// VL-IW shader core.
//
// An instruction is one to four 32-bit fragments. Every fragment carries an
// end bit (E, bit 31) and a phase bit (P, bit 30) above a 6-bit opcode and a
// 24-bit operand field; this E/P/opcode/operand split is the document's. The
// opcode numbering and the layout of the operand field are this design's own.
//
// Register operand field (arithmetic, PRED, ADDR):
//   [23:20] dst register (PRED: condition code)   [19:16] write mask, bit0 = x
//   [15:12] src register   [11:4] swizzle: bits [2c+1:2c] of it pick the source lane for lane c
//   [3] negate source      [2] source register indexed by the ADDR value
// Immediate operand field (BLR, BLD, LD, ST, HALT):
//   [23:20] register (LD destination / ST data)   [19:16] write mask
//   [15:0]  signed immediate (branch offset / target, memory offset)
//
// Data are 4-lane vectors (x, y, z, w) of signed 16.16 fixed-point numbers.
package gpu_pkg;

  localparam int unsigned FRAC      = 16;          // fraction bits of a lane
  localparam int unsigned NREGS     = 16;          // GPRs per thread
  localparam int unsigned REGW      = 4;           // GPR index width
  localparam int unsigned MAXFRAG   = 4;           // fragments per instruction
  localparam int unsigned PCW       = 16;          // program counter width
  localparam logic [7:0]  SWZ_IDENT = 8'hE4;       // w,z,y,x = 3,2,1,0
  localparam logic signed [31:0] ONE = 32'sh0001_0000;

  typedef logic signed [31:0] word_t;
  typedef logic [3:0][31:0]   vec4_t;              // [0] = x ... [3] = w

  typedef enum logic [5:0] {
    OP_NOP  = 6'h00,   // empty fragment
    OP_SRC  = 6'h01,   // "-": only supplies the second source of its phase
    OP_MOV  = 6'h02,
    OP_ADD  = 6'h03,
    OP_MUL  = 6'h04,
    OP_MULS = 6'h05,   // multiply, result saturated to [0, 1.0]
    OP_RCP  = 6'h06,   // scalar reciprocal
    OP_RSQ  = 6'h07,   // scalar reciprocal square root
    OP_CMP  = 6'h08,   // sign(src0 - src1) as -1.0 / 0 / +1.0
    OP_MVS  = 6'h09,   // move the return PC into a register lane
    OP_PRED = 6'h10,   // coordinate: predicate for phase #1
    OP_ADDR = 6'h11,   // coordinate: address / index for phase #1
    OP_BLR  = 6'h20,   // branch relative: PC = next PC + imm
    OP_BLD  = 6'h21,   // branch direct:   PC = ADDR + imm
    OP_LD   = 6'h22,   // load  vec4 from data memory [ADDR + imm]
    OP_ST   = 6'h23,   // store vec4 to   data memory [ADDR + imm]
    OP_HALT = 6'h24    // thread ends
  } opcode_e;

  typedef enum logic [3:0] {
    PC_Z  = 4'd0,      // == 0
    PC_NZ = 4'd1,      // != 0
    PC_N  = 4'd2,      // <  0
    PC_GE = 4'd3,      // >= 0
    PC_P  = 4'd4,      // >  0
    PC_LE = 4'd5       // <= 0
  } pred_cond_e;

  typedef struct packed {
    logic    e;        // end bit
    logic    p;        // phase bit
    opcode_e op;
    logic [23:0] operand;
  } frag_t;

  typedef struct packed {
    logic [REGW-1:0] dst;
    logic [3:0]      mask;
    logic [REGW-1:0] src;
    logic [7:0]      swz;
    logic            neg;
    logic            idx;
    logic [1:0]      rsv;
  } reg_field_t;

  typedef struct packed {
    logic [REGW-1:0] reg_;
    logic [3:0]      mask;
    logic [15:0]     imm;
  } imm_field_t;

  // A source operand as read by operand fetch.
  typedef struct packed {
    logic [REGW-1:0] r;
    logic [7:0]      swz;
    logic            neg;
    logic            idx;
  } src_t;

  // Role of a fragment inside its phase.
  typedef enum logic [2:0] {
    K_NONE  = 3'd0,    // slot empty
    K_PRIM  = 3'd1,    // primary micro-operation (dst, src0)
    K_SEC   = 3'd2,    // second fragment: src1 plus optional lane override
    K_PRED  = 3'd3,    // coordinate: predicate
    K_ADDR  = 3'd4     // coordinate: address
  } kind_e;

  typedef struct packed {
    kind_e           kind;
    opcode_e         op;
    logic [REGW-1:0] dst;
    logic [3:0]      mask;
    logic [15:0]     imm;
    src_t            src;    // source read through this slot's read port
    logic            rd;     // the slot's read port is used
  } slot_t;

  // One phase: at most two fragments, hence two read ports.
  typedef struct packed {
    slot_t [1:0] s;
  } phase_t;

  // Per-lane micro-operation after pre-coordination.
  typedef enum logic [3:0] {
    L_NONE = 4'd0, L_MOV = 4'd1, L_ADD = 4'd2, L_CMP = 4'd3, L_MUL = 4'd4,
    L_MULS = 4'd5, L_RCP = 4'd6, L_RSQ = 4'd7, L_PC = 4'd8, L_LD = 4'd9
  } lop_e;

  typedef lop_e [3:0] lane_ops_t;

  // ---------------------------------------------------------------- helpers
  function automatic logic is_coord(opcode_e op);
    return op inside {OP_PRED, OP_ADDR};
  endfunction

  function automatic logic is_ctrl(opcode_e op);   // branch / memory / halt
    return op inside {OP_BLR, OP_BLD, OP_LD, OP_ST, OP_HALT};
  endfunction

  function automatic logic is_imm_fmt(opcode_e op);
    return is_ctrl(op);
  endfunction

  function automatic vec4_t swizzle(vec4_t v, logic [7:0] swz, logic neg);
    vec4_t r;
    for (int c = 0; c < 4; c++) begin
      r[c] = v[swz[2*c +: 2]];
      if (neg) r[c] = -r[c];
    end
    return r;
  endfunction

  function automatic logic pred_eval(logic [3:0] cond, word_t v);
    case (cond)
      PC_Z:    return v == 0;
      PC_NZ:   return v != 0;
      PC_N:    return v < 0;
      PC_GE:   return v >= 0;
      PC_P:    return v > 0;
      PC_LE:   return v <= 0;
      default: return 1'b1;
    endcase
  endfunction

  // Integer part of a fixed-point lane (floor).
  function automatic logic [PCW-1:0] fx_int(word_t v);
    word_t s;
    s = v >>> FRAC;
    return s[PCW-1:0];
  endfunction

  function automatic word_t fx_from_int(logic [PCW-1:0] i);
    return word_t'({{(32-PCW){1'b0}}, i}) <<< FRAC;
  endfunction

  // Floor of the square root of a 64-bit value (restoring, bit by bit).
  function automatic logic [31:0] isqrt64(logic [63:0] x);
    logic [31:0] r;
    logic [31:0] t;
    logic [63:0] sq;
    r = '0;
    for (int b = 31; b >= 0; b--) begin
      t  = r | (32'd1 << b);
      sq = 64'(t) * 64'(t);
      if (sq <= x) r = t;
    end
    return r;
  endfunction

  function automatic lop_e op2lop(opcode_e op);
    case (op)
      OP_MOV:  return L_MOV;
      OP_ADD:  return L_ADD;
      OP_CMP:  return L_CMP;
      OP_MUL:  return L_MUL;
      OP_MULS: return L_MULS;
      OP_RCP:  return L_RCP;
      OP_RSQ:  return L_RSQ;
      OP_MVS:  return L_PC;
      OP_LD:   return L_LD;
      default: return L_NONE;
    endcase
  endfunction

  // Lane micro-operations of one phase: the primary's operation on the lanes
  // of its write mask, replaced by the secondary's override operation on the
  // lanes of the secondary's mask.
  function automatic lane_ops_t phase_lane_ops(phase_t ph);
    lane_ops_t l;
    for (int c = 0; c < 4; c++) l[c] = L_NONE;
    for (int k = 0; k < 2; k++)
      if (ph.s[k].kind == K_PRIM)
        for (int c = 0; c < 4; c++)
          if (ph.s[k].mask[c]) l[c] = op2lop(ph.s[k].op);
    for (int k = 0; k < 2; k++)
      if (ph.s[k].kind == K_SEC && !is_ctrl(ph.s[k].op))
        for (int c = 0; c < 4; c++)
          if (ph.s[k].mask[c] && op2lop(ph.s[k].op) != L_NONE)
            l[c] = op2lop(ph.s[k].op);
    return l;
  endfunction

  function automatic logic uses_adder(lop_e l);
    return l == L_ADD;
  endfunction

  function automatic logic uses_cmp(lop_e l);
    return l == L_CMP;
  endfunction

  function automatic logic uses_mul(lop_e l);
    return l inside {L_MUL, L_MULS};
  endfunction

endpackage
