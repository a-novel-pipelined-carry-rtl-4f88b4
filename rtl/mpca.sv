// mpca -- modified pipelined carry adder: an 8-bit adder built from small
// PCA triangles ("mini circuits") chained by their carries.
//
// A plain N-bit PCA (pca_core) needs N(N+1)/2 half adders, which grows
// quadratically. The modified PCA cuts the operands into short slices and
// gives each slice its own PCA triangle. Slice 0 has no carry-in; every
// later slice takes the OR-reduced carry-out of the slice below it as the
// carry-in of its bit 0. For the default 8-bit adder the slices are 3, 3
// and 2 bits wide, least significant first:
//   slice 0, 3 bits, no carry-in : 6 half adders, 3-input OR
//   slice 1, 3 bits, carry-in    : 9 half adders, 4-input OR
//   slice 2, 2 bits, carry-in    : 5 half adders, 3-input OR
// 20 half adders and 3 OR gates in all, against 36 half adders for the
// unpartitioned 8-bit PCA. The longest path runs through the slice
// carries: 4 + 4 + 3 = 11 gate delays, against 9 for the plain PCA and 15
// for a ripple carry adder.
//
// The split into 2- and 3-bit slices, the 8-bit width, the 9-bit result
// and the gate counts follow the description of the design; the order of
// the slices and the way a slice absorbs its carry-in are this design's
// reading, chosen because they give exactly those counts.
//
// Interface: a, b (N bits), sum (N+1 bits, the MSB is the carry-out).
// The slice widths are set by PART_W; N is their sum.
// Timing: purely combinational, no clock, no carry-in.
module mpca
  import pca_pkg::*;
#(
  parameter int unsigned NPARTS              = 3,           // number of slices
  parameter int unsigned PART_W [NPARTS]     = '{3, 3, 2},  // widths, LSB slice first
  parameter int unsigned N                   = 8            // operand width
) (
  input  logic [N-1:0] a,    // first operand
  input  logic [N-1:0] b,    // second operand
  output logic [N:0]   sum   // a + b
);

  // Bit position of the least significant bit of slice p.
  function automatic int unsigned part_lsb(int unsigned p);
    int unsigned acc = 0;
    for (int unsigned q = 0; q < p; q++) acc += PART_W[q];
    return acc;
  endfunction

  // Half adders of the whole adder (slice 0 has no carry-in).
  function automatic int unsigned total_ha();
    int unsigned acc = 0;
    for (int unsigned q = 0; q < NPARTS; q++) acc += pca_ha_count(PART_W[q], q != 0);
    return acc;
  endfunction

  localparam int unsigned HA_COUNT = total_ha();

  if (part_lsb(NPARTS) != N) begin : g_bad_partition
    $error("mpca: the slice widths must add up to N");
  end

  // carry[p] is the carry into slice p; carry[NPARTS] is the carry-out.
  logic [NPARTS:0] carry;
  assign carry[0] = 1'b0;

  for (genvar p = 0; p < NPARTS; p++) begin : part
    localparam int unsigned LSB = part_lsb(p);
    localparam int unsigned W   = PART_W[p];
    localparam bit          CIN = (p != 0);

    logic [pca_stages(W, CIN)-1:0] stage_cout;

    pca_core #(.N(W), .HAS_CIN(CIN)) u_pca (
      .a         (a[LSB +: W]),
      .b         (b[LSB +: W]),
      .cin       (carry[p]),
      .sum       (sum[LSB +: W]),
      .cout      (carry[p+1]),
      .stage_cout(stage_cout)
    );
  end

  assign sum[N] = carry[NPARTS];

endmodule
