// pca_core -- N-bit pipelined carry adder (PCA), optionally with a carry-in.
//
// The adder is a triangle of half adders. Stage 1 holds one half adder per
// bit and adds a and b. Every later stage k adds, bit by bit, the sum vector
// of stage k-1 to the carries of stage k-1 shifted up one position. A bit
// below the lowest carry still in flight no longer changes, so stage k only
// needs half adders from bit k-1 upwards: N + (N-1) + ... + 1 = N(N+1)/2
// half adders in all (36 for N = 8), and the sum is final after N stages.
// The carry that leaves the top bit of each stage goes to one N-input OR
// gate, whose output is the carry-out. At most one of those carries can be
// 1 (the total is below 2^(N+1)), so the OR is exact. The carry-out path is
// N half adders plus the OR: N + 1 gate delays, against about 2N for a ripple
// carry adder.
//
// With HAS_CIN = 1 the block is one "mini circuit" of the modified PCA: the
// carry-in is the addend of bit 0 in stage 2, which adds one full row of
// half adders and one stage (w + w(w+1)/2 half adders, a (w+1)-input OR).
// How the carry-in enters is this design's own reading of the partitioned
// adder; with it the 3+3+2 partition needs exactly 20 half adders and two
// 3-input and one 4-input OR gate.
//
// Interface: a, b (N bits), cin (ignored when HAS_CIN = 0); sum (N bits),
// cout, and stage_cout, the per-stage top-bit carries that feed the OR
// (bit k-1 for stage k), brought out for observation.
// Timing: purely combinational, no clock.
module pca_core
  import pca_pkg::*;
#(
  parameter int unsigned N       = 8,    // operand width
  parameter bit          HAS_CIN = 1'b0  // 1: add cin at bit 0
) (
  input  logic [N-1:0]                       a,
  input  logic [N-1:0]                       b,
  input  logic                               cin,
  output logic [N-1:0]                       sum,
  output logic                               cout,
  output logic [pca_stages(N, HAS_CIN)-1:0]  stage_cout
);

  localparam int unsigned NSTAGES  = pca_stages(N, HAS_CIN);

  if (N < 1) begin : g_bad_width
    $error("pca_core: N must be at least 1");
  end

  // Stage k leaves its sum vector in s_st[k-1] and its bit carries in
  // c_st[k-1].
  logic [N-1:0] s_st [NSTAGES];
  logic [N-1:0] c_st [NSTAGES];

  for (genvar k = 1; k <= NSTAGES; k++) begin : stg
    logic [N-1:0] s;
    logic [N-1:0] c;
    logic [N-1:0] x;  // first half-adder input of each bit
    logic [N-1:0] y;  // second half-adder input of each bit

    // Inputs of this stage.
    if (k == 1) begin : g_in_first
      assign x = a;
      assign y = b;
    end else begin : g_in_next
      assign x = s_st[k-2];
      if (N > 1) begin : g_shift
        assign y = {c_st[k-2][N-2:0], (HAS_CIN && k == 2) ? cin : 1'b0};
      end else begin : g_one
        assign y = (HAS_CIN && k == 2) ? cin : 1'b0;
      end
    end

    for (genvar i = 0; i < N; i++) begin : bit_
      if (i >= pca_low_bit(k, HAS_CIN)) begin : g_ha
        half_adder u_ha (.a(x[i]), .b(y[i]), .s(s[i]), .c(c[i]));
      end else begin : g_done
        // Settled bit: passes through, produces no carry.
        assign s[i] = x[i];
        assign c[i] = 1'b0;
      end
    end

    assign s_st[k-1]       = s;
    assign c_st[k-1]       = c;
    assign stage_cout[k-1] = c[N-1];
  end

  assign sum  = s_st[NSTAGES-1];
  assign cout = |stage_cout;

endmodule
