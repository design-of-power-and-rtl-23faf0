// tb_window_extractor: streams two random images (3-bit pixels, 9x7) through
// the window extractor, with idle cycles between pixels in the second one,
// and compares each window with the image held in the testbench. The number
// of windows must be (W-2)*(H-2) per image, and no window may be flagged for
// a border centre.
module tb_window_extractor;
  localparam int PIX_W = 3, IMG_W = 9, IMG_H = 7;
  localparam int COL_W = $clog2(IMG_W), ROW_W = $clog2(IMG_H);
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [PIX_W-1:0] in_pix = 0;
  logic [COL_W-1:0] in_col = 0;
  logic [ROW_W-1:0] in_row = 0;
  logic win_valid;
  logic [PIX_W-1:0] win [3][3];
  logic [COL_W-1:0] win_col;
  logic [ROW_W-1:0] win_row;
  logic [PIX_W-1:0] img [IMG_H][IMG_W];
  int checks = 0, failures = 0, nwin = 0;

  window_extractor #(.PIX_W(PIX_W), .IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    #1;
    if (win_valid) begin
      nwin++;
      checks++;
      if (win_row < 1 || win_row > IMG_H - 2 || win_col < 1 || win_col > IMG_W - 2) begin
        failures++;
        $display("FAIL border window at (%0d,%0d)", win_row, win_col);
      end else begin
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++)
            if (win[i][j] != img[int'(win_row) - 1 + i][int'(win_col) - 1 + j]) begin
              failures++;
              $display("FAIL window (%0d,%0d) [%0d][%0d]", win_row, win_col, i, j);
            end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < IMG_H; r++)
        for (int c = 0; c < IMG_W; c++)
          img[r][c] = PIX_W'($urandom);
      nwin = 0;
      for (int r = 0; r < IMG_H; r++) begin
        for (int c = 0; c < IMG_W; c++) begin
          @(negedge clk);
          in_valid = 1; in_pix = img[r][c];
          in_col = COL_W'(c); in_row = ROW_W'(r);
          if (pass == 1 && $urandom_range(0, 2) == 0) begin
            @(negedge clk);
            in_valid = 0;
          end
        end
      end
      @(negedge clk) in_valid = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (nwin != (IMG_W - 2) * (IMG_H - 2)) begin
        failures++;
        $display("FAIL pass %0d: %0d windows", pass, nwin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
