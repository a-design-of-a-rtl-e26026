// common_alu: the arithmetic units shared by phase #0 and phase #1.
//
// Four adder lanes, four comparator lanes, four multiplier lanes (plain, or
// saturated to [0, 1.0]), one scalar reciprocal unit and one scalar
// reciprocal-square-root unit. The document fixes this sharing (one
// set of ALUs for both phases, the special functions as scalar units); the
// number format is this design's: signed 16.16 fixed point, with wrap-around
// on overflow except where noted. Compare gives -1.0, 0 or +1.0 for a < b,
// a == b, a > b. rcp(0) and rsq(x <= 0) return the largest positive value.
//
// Purely combinational; the core registers its outputs.
module common_alu
  import gpu_pkg::*;
(
  input  vec4_t      add_a, add_b,
  input  vec4_t      cmp_a, cmp_b,
  input  vec4_t      mul_a, mul_b,
  input  logic [3:0] mul_sat,
  input  word_t      rcp_in,
  input  word_t      rsq_in,
  output vec4_t      add_y,
  output vec4_t      cmp_y,
  output vec4_t      mul_y,
  output word_t      rcp_y,
  output word_t      rsq_y
);
  localparam word_t MAXPOS = 32'sh7FFF_FFFF;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic signed [32:0] d;
      logic signed [63:0] m;
      word_t              mq;
      add_y[c] = add_a[c] + add_b[c];
      d = 33'(signed'(cmp_a[c])) - 33'(signed'(cmp_b[c]));
      cmp_y[c] = (d < 0) ? -ONE : (d == 0) ? 32'sd0 : ONE;
      m  = 64'(signed'(mul_a[c])) * 64'(signed'(mul_b[c]));
      mq = word_t'(m >>> FRAC);
      if (mul_sat[c]) begin
        if (m < 0)                          mq = '0;
        else if ((m >>> FRAC) > 64'(ONE))   mq = ONE;
      end
      mul_y[c] = mq;
    end
  end

  always_comb begin
    logic [63:0] num;
    logic [31:0] s;
    logic signed [63:0] q;
    q   = '0;
    s   = '0;
    num = '0;
    // rcp: 2^32 / x
    if (rcp_in == 0) rcp_y = MAXPOS;
    else begin
      q = 64'sh1_0000_0000 / 64'(rcp_in);
      rcp_y = word_t'(q);
    end
    // rsq: 2^40 / sqrt(x * 2^32)
    if (rsq_in <= 0) rsq_y = MAXPOS;
    else begin
      s   = isqrt64({rsq_in[31:0], 32'h0});
      num = 64'h100_0000_0000 / 64'(s);
      rsq_y = (num > 64'(MAXPOS)) ? MAXPOS : word_t'(num);
    end
  end

endmodule
