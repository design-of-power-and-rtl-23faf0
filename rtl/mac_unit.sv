// mac_unit: multiply-accumulate unit built on the compressor multiplier.
//
// Each cycle with en high, the 16-bit product multiplier*multiplicand from
// compressor_multiplier is added to the ACC_W-bit accumulator. clr starts a
// new accumulation: with clr and en high together the accumulator is loaded
// with the current product, with clr alone it is set to zero. The accumulator
// wraps modulo 2^ACC_W; with the default 24 bits, 256 products of the largest
// size (255*255) can be summed without wrapping.
//
// Timing: the product is combinational; mac_result is the registered
// accumulator, so a term presented in cycle t is visible in mac_result after
// the clock edge that ends cycle t. rst_n is an asynchronous, active-low
// reset that clears the accumulator.
//
// The multiplier feeding the accumulator follows the reference design; the
// accumulator width, the clear/enable controls and the reset are this
// design's own choices.
module mac_unit
  import sobel_pkg::*;
#(
  parameter int unsigned ACC_W = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                clr,
  input  logic [MULT_N-1:0]   multiplier,
  input  logic [MULT_N-1:0]   multiplicand,
  output logic [ACC_W-1:0]    mac_result
);
  logic [2*MULT_N-1:0] product;

  compressor_multiplier u_mult (
    .x      (multiplier),
    .y      (multiplicand),
    .product(product)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_result <= '0;
    end else if (clr) begin
      mac_result <= en ? ACC_W'(product) : '0;
    end else if (en) begin
      mac_result <= mac_result + ACC_W'(product);
    end
  end
endmodule
