// compressor_multiplier: 8x8 unsigned multiplier with a two-stage 4-2
// compressor tree.
//
// Structure (column-compression multiplier):
//   * partial products: pp[j] = (x AND y[j]) << j, eight rows, 15 columns;
//   * stage 1: rows 0-3 and rows 4-7 each go through one row of 4-2
//     compressors, leaving four operands (matrix height 8 -> 4);
//   * stage 2: one more row of 4-2 compressors (height 4 -> 2);
//   * final carry-propagate adder of the two remaining operands.
// The two compression stages follow the published dot diagram of the
// multiplier; which column of that diagram uses a compressor, full adder or
// half adder is left to synthesis here, since 4-2 cells fed with constant
// zeros reduce to those smaller counters.
//
// Every compressor is the exact one (compressor_4_2), so the product is exact.
// The approximate compressor variants the design family is built around would
// replace compressor_4_2 in the low columns without changing this structure.
//
// Interface: x, y (8-bit unsigned) in, product (16-bit) out. The reference
// RTL view shows a 15-bit product port; 16 bits are kept here so that every
// 8x8 product is representable (bit 15 is the final carry out of column 14).
// Purely combinational, no clock.
module compressor_multiplier
  import sobel_pkg::*;
(
  input  logic [MULT_N-1:0]   x,
  input  logic [MULT_N-1:0]   y,
  output logic [2*MULT_N-1:0] product
);
  localparam int unsigned N = MULT_N;
  localparam int unsigned W = 2 * N;

  logic [W-1:0] pp [N];
  logic [W-1:0] s1a, c1a, s1b, c1b;
  logic [W-1:0] s2, c2;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      pp[j] = W'(x & {N{y[j]}}) << j;
    end
  end

  // Stage 1: two independent compressor rows.
  compressor_row_4_2 #(.W(W)) u_stage1_lo (
    .a(pp[0]), .b(pp[1]), .c(pp[2]), .d(pp[3]), .s(s1a), .cy(c1a)
  );
  compressor_row_4_2 #(.W(W)) u_stage1_hi (
    .a(pp[4]), .b(pp[5]), .c(pp[6]), .d(pp[7]), .s(s1b), .cy(c1b)
  );

  // Stage 2: four operands down to two.
  compressor_row_4_2 #(.W(W)) u_stage2 (
    .a(s1a), .b(c1a), .c(s1b), .d(c1b), .s(s2), .cy(c2)
  );

  // Final carry-propagate addition.
  assign product = s2 + c2;
endmodule
