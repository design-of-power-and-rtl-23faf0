// compressor_row_4_2: one stage of 4-2 compression over W columns.
//
// Four W-bit operands in, two W-bit operands out, with
// a + b + c + d = s + cy (mod 2^W). Column i holds one compressor_4_2 whose
// cin is the cout of column i-1 (column 0 gets 0). The carry and cout of
// column i have weight i+1, so both are placed one column up: carry goes into
// cy, and cout is passed on as the next column's cin. The carry out of the
// top column is dropped, which is exact as long as the true sum fits in W
// bits. Constant-zero operand bits make the compressor of that column reduce
// to a full or half adder after synthesis, which is how the irregular dot
// matrix of a column-compression multiplier is covered by regular rows.
// Purely combinational.
module compressor_row_4_2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W:0] cin_chain;
  logic [W-1:0] carry;

  assign cin_chain[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_col
    compressor_4_2 u_cmp (
      .x1   (a[i]),
      .x2   (b[i]),
      .x3   (c[i]),
      .x4   (d[i]),
      .cin  (cin_chain[i]),
      .sum  (s[i]),
      .carry(carry[i]),
      .cout (cin_chain[i+1])
    );
  end

  assign cy = {carry[W-2:0], 1'b0};
endmodule
