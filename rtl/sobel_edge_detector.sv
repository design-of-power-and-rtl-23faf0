// sobel_edge_detector: Sobel edge detection of an image held in on-chip RAM.
//
// Flow: the image (IMG_W x IMG_H pixels of PIX_W bits, binary by default) is
// first written into image_ram through the load port. A start pulse makes the
// scan controller read the RAM in raster order, one pixel per cycle; the
// window_extractor turns that stream into 3x3 windows; sobel_gradient applies
// the two Sobel kernels; gradient_magnitude combines the two gradients into
// sqrt(gx^2 + gy^2) using the compressor multipliers for the squares.
//
// Pipeline, one window per cycle after the first two rows are buffered:
//   cycle 0  RAM read issued (scan controller)
//   cycle 1  pixel on rdata, window shift register updated at the edge
//   cycle 2  window valid; gradients registered at the edge
//   cycle 3  gradients valid; magnitude registered at the edge
//   cycle 4  out_valid with out_mag, out_row, out_col (window centre)
// A scan takes IMG_W*IMG_H read cycles; the last magnitude (centre
// IMG_H-2, IMG_W-2) appears 4 cycles after the last read, together with a
// one-cycle done pulse: done is seen IMG_W*IMG_H + 3 clock edges after the
// edge that samples start. busy is high from the cycle after start until done.
// Only interior pixels produce outputs, (IMG_W-2)*(IMG_H-2) in all.
//
// Interface: ld_we/ld_addr/ld_pix write one pixel (address = row*IMG_W+col)
// and are ignored while busy; start is ignored while busy. rst_n is an
// asynchronous, active-low reset of control state.
// The RAM-then-scan flow, the Sobel kernels and the Euclidean magnitude follow
// the reference; the load port, pipeline depth and handshake are this
// design's own.
module sobel_edge_detector
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 128,
  parameter int unsigned IMG_H = 128,
  parameter int unsigned PIX_W = 1,
  parameter int unsigned COL_W = $clog2(IMG_W),
  parameter int unsigned ROW_W = $clog2(IMG_H),
  parameter int unsigned ADDR_W = $clog2(IMG_W * IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // image load port
  input  logic              ld_we,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [PIX_W-1:0]  ld_pix,
  // control
  input  logic              start,
  output logic              busy,
  output logic              done,
  // edge-strength stream
  output logic              out_valid,
  output logic [COL_W-1:0]  out_col,
  output logic [ROW_W-1:0]  out_row,
  output logic [MULT_N:0]   out_mag
);
  localparam int unsigned GW = PIX_W + 4;

  // Parameter rules: the gradients must fit the 8-bit multiplier operands.
  initial begin
    assert (PIX_W >= 1 && PIX_W <= 6)
      else $error("sobel_edge_detector: PIX_W must be 1..6");
    assert (IMG_W >= 3 && IMG_H >= 3)
      else $error("sobel_edge_detector: image must be at least 3x3");
  end

  // ---------------------------------------------------------------- scan
  typedef enum logic {S_IDLE, S_SCAN} scan_state_e;
  scan_state_e state;

  logic [COL_W-1:0]  rd_col;
  logic [ROW_W-1:0]  rd_row;
  logic [ADDR_W-1:0] rd_addr;
  logic              rd_en;
  logic              rd_last;

  assign rd_en   = (state == S_SCAN);
  assign rd_last = (rd_col == COL_W'(IMG_W - 1)) && (rd_row == ROW_W'(IMG_H - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      rd_col  <= '0;
      rd_row  <= '0;
      rd_addr <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (start && !busy) begin
            state   <= S_SCAN;
            rd_col  <= '0;
            rd_row  <= '0;
            rd_addr <= '0;
          end
        end
        S_SCAN: begin
          rd_addr <= rd_addr + ADDR_W'(1);
          if (rd_col == COL_W'(IMG_W - 1)) begin
            rd_col <= '0;
            rd_row <= rd_row + ROW_W'(1);
          end else begin
            rd_col <= rd_col + COL_W'(1);
          end
          if (rd_last) begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
    end else if (start && !busy) begin
      busy <= 1'b1;
    end else if (done) begin
      busy <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- RAM
  logic [PIX_W-1:0] pix;

  image_ram #(
    .DATA_W(PIX_W),
    .DEPTH (IMG_W * IMG_H),
    .ADDR_W(ADDR_W)
  ) u_ram (
    .clk  (clk),
    .we   (ld_we && !busy),
    .waddr(ld_addr),
    .wdata(ld_pix),
    .re   (rd_en),
    .raddr(rd_addr),
    .rdata(pix)
  );

  // Coordinates travel alongside the one-cycle RAM read.
  logic             pix_valid;
  logic [COL_W-1:0] pix_col;
  logic [ROW_W-1:0] pix_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_valid <= 1'b0;
      pix_col   <= '0;
      pix_row   <= '0;
    end else begin
      pix_valid <= rd_en;
      pix_col   <= rd_col;
      pix_row   <= rd_row;
    end
  end

  // ---------------------------------------------------------------- window
  logic             win_valid;
  logic [PIX_W-1:0] win [3][3];
  logic [COL_W-1:0] win_col;
  logic [ROW_W-1:0] win_row;

  window_extractor #(
    .PIX_W(PIX_W),
    .IMG_W(IMG_W),
    .IMG_H(IMG_H),
    .COL_W(COL_W),
    .ROW_W(ROW_W)
  ) u_win (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pix_valid),
    .in_pix   (pix),
    .in_col   (pix_col),
    .in_row   (pix_row),
    .win_valid(win_valid),
    .win      (win),
    .win_col  (win_col),
    .win_row  (win_row)
  );

  // ---------------------------------------------------------------- gradients
  logic signed [GW-1:0] gx_c, gy_c, gx_q, gy_q;
  logic                 g_valid;
  logic [COL_W-1:0]     g_col;
  logic [ROW_W-1:0]     g_row;

  sobel_gradient #(.PIX_W(PIX_W), .GW(GW)) u_grad (
    .win(win), .gx(gx_c), .gy(gy_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_valid <= 1'b0;
      gx_q    <= '0;
      gy_q    <= '0;
      g_col   <= '0;
      g_row   <= '0;
    end else begin
      g_valid <= win_valid;
      gx_q    <= gx_c;
      gy_q    <= gy_c;
      g_col   <= win_col;
      g_row   <= win_row;
    end
  end

  // ---------------------------------------------------------------- magnitude
  logic [MULT_N:0] mag_c;

  gradient_magnitude #(.GW(GW)) u_mag (
    .gx(gx_q), .gy(gy_q), .mag(mag_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mag   <= '0;
      out_col   <= '0;
      out_row   <= '0;
    end else begin
      out_valid <= g_valid;
      out_mag   <= mag_c;
      out_col   <= g_col;
      out_row   <= g_row;
    end
  end

  assign done = out_valid && (out_col == COL_W'(IMG_W - 2))
                          && (out_row == ROW_W'(IMG_H - 2));
endmodule
