// sobel_gradient: applies the two 3x3 Sobel kernels to one pixel window.
//
// gx = sum over the window of GX_MASK[i][j] * win[i][j]   (1 0 -1 / 2 0 -2 / 1 0 -1)
// gy = sum over the window of GY_MASK[i][j] * win[i][j]   (-1 -2 -1 / 0 0 0 / 1 2 1)
// The kernels are the standard Sobel operator; the weights of 1 and 2 are
// wired as the pixel itself and the pixel shifted left by one, so no
// multiplier is needed here. Pixels are unsigned PIX_W-bit values; each
// gradient lies in [-4*(2^PIX_W-1), 4*(2^PIX_W-1)] and is returned as a
// signed PIX_W+4-bit number. Purely combinational.
module sobel_gradient
  import sobel_pkg::*;
#(
  parameter int unsigned PIX_W = 1,
  parameter int unsigned GW    = PIX_W + 4
) (
  input  logic [PIX_W-1:0]     win [3][3],
  output logic signed [GW-1:0] gx,
  output logic signed [GW-1:0] gy
);
  always_comb begin
    logic signed [GW-1:0] px;
    gx = '0;
    gy = '0;
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        px = GW'(win[i][j]);
        case (GX_MASK[i][j])
          1:       gx = gx + px;
          2:       gx = gx + (px <<< 1);
          -1:      gx = gx - px;
          -2:      gx = gx - (px <<< 1);
          default: gx = gx;
        endcase
        case (GY_MASK[i][j])
          1:       gy = gy + px;
          2:       gy = gy + (px <<< 1);
          -1:      gy = gy - px;
          -2:      gy = gy - (px <<< 1);
          default: gy = gy;
        endcase
      end
    end
  end
endmodule
