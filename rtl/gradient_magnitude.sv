// gradient_magnitude: edge strength sqrt(gx^2 + gy^2), rounded down.
//
// The absolute values of the two Sobel gradients are squared by two
// compressor_multiplier instances (8x8 -> 16 bits); the sum of the squares
// (17 bits) goes to an integer square root (isqrt), whose 9-bit result is the
// magnitude. Using the compressor multipliers for the squares is where the
// multipliers enter the edge detector; the choice of the Euclidean norm
// follows the reference, the floor rounding is this design's own.
//
// Gradients are signed GW-bit inputs whose absolute value must fit in the
// 8-bit multiplier operands; this holds for pixels of up to 6 bits
// (|g| <= 4*63 = 252). Purely combinational.
module gradient_magnitude
  import sobel_pkg::*;
#(
  parameter int unsigned GW = 5
) (
  input  logic signed [GW-1:0]   gx,
  input  logic signed [GW-1:0]   gy,
  output logic [MULT_N:0]        mag
);
  logic [GW-1:0]         abs_x, abs_y;
  logic [MULT_N-1:0]     op_x, op_y;
  logic [2*MULT_N-1:0]   sq_x, sq_y;
  logic [2*MULT_N:0]     sum_sq;

  always_comb begin
    abs_x = gx[GW-1] ? GW'(-gx) : GW'(gx);
    abs_y = gy[GW-1] ? GW'(-gy) : GW'(gy);
    op_x  = MULT_N'(abs_x);
    op_y  = MULT_N'(abs_y);
  end

  compressor_multiplier u_sq_x (.x(op_x), .y(op_x), .product(sq_x));
  compressor_multiplier u_sq_y (.x(op_y), .y(op_y), .product(sq_y));

  assign sum_sq = {1'b0, sq_x} + {1'b0, sq_y};

  isqrt #(.IN_W(2*MULT_N+1), .OUT_W(MULT_N+1)) u_sqrt (
    .radicand(sum_sq),
    .root    (mag)
  );
endmodule
