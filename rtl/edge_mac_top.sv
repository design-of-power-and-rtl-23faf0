// edge_mac_top: the two uses of the compressor multiplier side by side.
//
// * sobel_edge_detector: an image is loaded into on-chip RAM, scanned with a
//   3x3 window, filtered by the two Sobel kernels, and the edge strength
//   sqrt(gx^2+gy^2) is streamed out, the squares being formed by compressor
//   multipliers. Ports prefixed sobel_ (see sobel_edge_detector for timing).
// * mac_unit: an 8x8 multiply-accumulate unit on the same multiplier.
//   Ports prefixed mac_ (see mac_unit for timing).
// The two share only the clock and the asynchronous active-low reset; they
// are independent datapaths and run concurrently.
module edge_mac_top
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W  = 128,
  parameter int unsigned IMG_H  = 128,
  parameter int unsigned PIX_W  = 1,
  parameter int unsigned ACC_W  = 24,
  parameter int unsigned COL_W  = $clog2(IMG_W),
  parameter int unsigned ROW_W  = $clog2(IMG_H),
  parameter int unsigned ADDR_W = $clog2(IMG_W * IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // Sobel edge detector
  input  logic              sobel_ld_we,
  input  logic [ADDR_W-1:0] sobel_ld_addr,
  input  logic [PIX_W-1:0]  sobel_ld_pix,
  input  logic              sobel_start,
  output logic              sobel_busy,
  output logic              sobel_done,
  output logic              sobel_out_valid,
  output logic [COL_W-1:0]  sobel_out_col,
  output logic [ROW_W-1:0]  sobel_out_row,
  output logic [MULT_N:0]   sobel_out_mag,
  // multiply-accumulate unit
  input  logic              mac_en,
  input  logic              mac_clr,
  input  logic [MULT_N-1:0] mac_multiplier,
  input  logic [MULT_N-1:0] mac_multiplicand,
  output logic [ACC_W-1:0]  mac_result
);
  sobel_edge_detector #(
    .IMG_W (IMG_W),
    .IMG_H (IMG_H),
    .PIX_W (PIX_W),
    .COL_W (COL_W),
    .ROW_W (ROW_W),
    .ADDR_W(ADDR_W)
  ) u_sobel (
    .clk      (clk),
    .rst_n    (rst_n),
    .ld_we    (sobel_ld_we),
    .ld_addr  (sobel_ld_addr),
    .ld_pix   (sobel_ld_pix),
    .start    (sobel_start),
    .busy     (sobel_busy),
    .done     (sobel_done),
    .out_valid(sobel_out_valid),
    .out_col  (sobel_out_col),
    .out_row  (sobel_out_row),
    .out_mag  (sobel_out_mag)
  );

  mac_unit #(.ACC_W(ACC_W)) u_mac (
    .clk         (clk),
    .rst_n       (rst_n),
    .en          (mac_en),
    .clr         (mac_clr),
    .multiplier  (mac_multiplier),
    .multiplicand(mac_multiplicand),
    .mac_result  (mac_result)
  );
endmodule
