// window_extractor: builds 3x3 pixel windows from a raster-order pixel stream.
//
// Pixels arrive one per cycle (in_valid) with their column and row. Two line
// buffers of IMG_W pixels keep the two previous image rows: at column c, the
// buffers supply the pixels of rows r-2 and r-1, and the incoming pixel is row
// r. These three pixels form the newest (rightmost) column of a 3x3 shift
// register; the two older columns were shifted in by the previous two pixels.
// Once the stream has reached row 2 and column 2 of a row, the register holds
// a complete window centred on (r-1, c-1), and win_valid is raised for it.
// Border pixels (row or column 0 and IMG_W-1 / IMG_H-1) never become window
// centres, so an IMG_W x IMG_H image gives (IMG_W-2) x (IMG_H-2) windows.
//
// Timing: registered outputs; the window completed by a pixel accepted at one
// clock edge is presented after that edge, with win_row/win_col giving its
// centre. win[i][j]: i = 0 is the top row, j = 0 the left column. rst_n is an
// asynchronous, active-low reset of the valid flag; the pixel storage needs
// none. The line-buffer organisation is this design's own choice; the
// reference flow only asks for the image window to be extracted.
module window_extractor #(
  parameter int unsigned PIX_W = 1,
  parameter int unsigned IMG_W = 128,
  parameter int unsigned IMG_H = 128,
  parameter int unsigned COL_W = $clog2(IMG_W),
  parameter int unsigned ROW_W = $clog2(IMG_H)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  input  logic [COL_W-1:0] in_col,
  input  logic [ROW_W-1:0] in_row,
  output logic             win_valid,
  output logic [PIX_W-1:0] win [3][3],
  output logic [COL_W-1:0] win_col,
  output logic [ROW_W-1:0] win_row
);
  logic [PIX_W-1:0] line_m1 [IMG_W];  // row r-1
  logic [PIX_W-1:0] line_m2 [IMG_W];  // row r-2

  always_ff @(posedge clk) begin
    if (in_valid) begin
      line_m2[in_col] <= line_m1[in_col];
      line_m1[in_col] <= in_pix;
      for (int i = 0; i < 3; i++) begin
        win[i][0] <= win[i][1];
        win[i][1] <= win[i][2];
      end
      win[0][2] <= line_m2[in_col];
      win[1][2] <= line_m1[in_col];
      win[2][2] <= in_pix;
      win_col   <= in_col - COL_W'(1);
      win_row   <= in_row - ROW_W'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid && (in_row >= ROW_W'(2)) && (in_col >= COL_W'(2));
    end
  end
endmodule
