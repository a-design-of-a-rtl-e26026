// instr_mem: instruction memory of 32-bit fragments that returns the four
// fragments starting at any fragment address in one access, so that the
// longest variable-length instruction (four fragments, 128 bits) is always
// fetched at once.
//
// The memory is split into four banks interleaved on the two low address
// bits; each bank reads one row per cycle and the four words are rotated
// into program order. The document only names the instruction store and the
// "max x4" instruction buffer; the banking, the depth (DEPTH fragments) and
// the write port used to load programs are this design's own.
//
// Timing: synchronous read, rd_frag is valid the cycle after rd_addr.
// Addresses wrap at DEPTH. Writes take one fragment per cycle.
module instr_mem
  import gpu_pkg::*;
#(
  parameter int unsigned DEPTH = 1024          // fragments, a multiple of 4
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [31:0]              wdata,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [MAXFRAG-1:0][31:0] rd_frag      // [0] = fragment at rd_addr
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned RW = AW - 2;

  logic [31:0] bank0 [DEPTH/4];
  logic [31:0] bank1 [DEPTH/4];
  logic [31:0] bank2 [DEPTH/4];
  logic [31:0] bank3 [DEPTH/4];

  logic [RW-1:0] row [4];
  logic [31:0]   q   [4];
  logic [1:0]    rot_q;

  // Bank b holds fragment k = (b - rd_addr) mod 4 of the group.
  always_comb begin
    for (int b = 0; b < 4; b++) begin
      logic [1:0]    k;
      logic [AW-1:0] a;
      k = 2'(b) - rd_addr[1:0];
      a = rd_addr + AW'(k);
      row[b] = a[AW-1:2];
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      case (waddr[1:0])
        2'd0: bank0[waddr[AW-1:2]] <= wdata;
        2'd1: bank1[waddr[AW-1:2]] <= wdata;
        2'd2: bank2[waddr[AW-1:2]] <= wdata;
        default: bank3[waddr[AW-1:2]] <= wdata;
      endcase
    end
    q[0]  <= bank0[row[0]];
    q[1]  <= bank1[row[1]];
    q[2]  <= bank2[row[2]];
    q[3]  <= bank3[row[3]];
    rot_q <= rd_addr[1:0];
  end

  always_comb begin
    for (int k = 0; k < 4; k++) rd_frag[k] = q[2'(k) + rot_q];
  end

endmodule
