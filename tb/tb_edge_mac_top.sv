// tb_edge_mac_top: end-to-end test of edge_mac_top at its default sizes
// (128x128 binary image, 24-bit accumulator).
//
// The Sobel side loads a synthetic binary image (filled discs, a rectangle
// and scattered noise pixels, standing in for a thresholded photograph),
// scans it, and checks every output magnitude and position against a model
// of the Sobel operator, the output count (126*126) and the scan time
// (IMG_W*IMG_H + 3 edges from start to done). During the scan it tries a RAM
// write and a second start, which must both be ignored. While the image is
// loaded and scanned, the MAC side runs dot products of random vectors
// (clear-and-load, accumulate, hold) and one long run of large products that
// wraps the accumulator, checked every cycle against an integer model.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_edge_mac_top;
  localparam int IMG_W = 128, IMG_H = 128, ACC_W = 24;
  localparam int COL_W = $clog2(IMG_W), ROW_W = $clog2(IMG_H);
  localparam int ADDR_W = $clog2(IMG_W * IMG_H);
  localparam int N = IMG_W * IMG_H;

  logic clk = 0, rst_n = 0;
  logic sobel_ld_we = 0;
  logic [ADDR_W-1:0] sobel_ld_addr = 0;
  logic [0:0] sobel_ld_pix = 0;
  logic sobel_start = 0, sobel_busy, sobel_done, sobel_out_valid;
  logic [COL_W-1:0] sobel_out_col;
  logic [ROW_W-1:0] sobel_out_row;
  logic [8:0] sobel_out_mag;
  logic mac_en = 0, mac_clr = 0;
  logic [7:0] mac_multiplier = 0, mac_multiplicand = 0;
  logic [ACC_W-1:0] mac_result;

  edge_mac_top dut (.*);

  int img [IMG_H][IMG_W];
  bit seen [IMG_H][IMG_W];
  int checks = 0, failures = 0, cyc = 0, start_cyc = 0, done_cyc = -1;
  int n_load = 0, n_ignored_ld = 0, n_ignored_start = 0, n_out = 0;
  int n_edge = 0, n_flat = 0, n_border_rows = 0;
  int n_mac_clr = 0, n_mac_load = 0, n_mac_acc = 0, n_mac_hold = 0, n_mac_wrap = 0;
  bit sobel_finished = 0;
  longint mac_model = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // ------------------------------------------------------------ image model
  function automatic int ref_mag(int r, int c);
    int gx, gy, s, m;
    gx = (img[r-1][c-1] + 2 * img[r][c-1] + img[r+1][c-1])
       - (img[r-1][c+1] + 2 * img[r][c+1] + img[r+1][c+1]);
    gy = (img[r+1][c-1] + 2 * img[r+1][c] + img[r+1][c+1])
       - (img[r-1][c-1] + 2 * img[r-1][c] + img[r-1][c+1]);
    s = gx * gx + gy * gy;
    m = 0;
    while ((m + 1) * (m + 1) <= s) m++;
    return m;
  endfunction

  task automatic make_image();
    int cx [4] = '{30, 90, 40, 95};
    int cy [4] = '{30, 35, 92, 95};
    int rad [4] = '{18, 15, 20, 14};
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        img[r][c] = 0;
        for (int k = 0; k < 4; k++)
          if ((r - cy[k]) * (r - cy[k]) + (c - cx[k]) * (c - cx[k]) <= rad[k] * rad[k])
            img[r][c] = 1;
        if (r >= 60 && r < 70 && c >= 55 && c < 120) img[r][c] = 1;
        if ($urandom_range(0, 199) == 0) img[r][c] = 1 - img[r][c];
      end
  endtask

  // ------------------------------------------------------------ Sobel output checker
  always @(posedge clk) begin
    #1;
    if (sobel_out_valid) begin
      int r, c;
      r = int'(sobel_out_row);
      c = int'(sobel_out_col);
      n_out++;
      checks++;
      if (r < 1 || r > IMG_H - 2 || c < 1 || c > IMG_W - 2 || seen[r][c]) begin
        failures++;
        $display("FAIL bad or repeated output position (%0d,%0d)", r, c);
      end else begin
        seen[r][c] = 1;
        if (r == 1 || r == IMG_H - 2) n_border_rows++;
        if (int'(sobel_out_mag) != ref_mag(r, c)) begin
          failures++;
          if (failures < 10)
            $display("FAIL (%0d,%0d) mag %0d expected %0d", r, c, sobel_out_mag, ref_mag(r, c));
        end
        if (sobel_out_mag != 0) n_edge++; else n_flat++;
      end
    end
    if (sobel_done) done_cyc = cyc;
  end

  // ------------------------------------------------------------ Sobel stimulus
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    make_image();
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        @(negedge clk);
        sobel_ld_we = 1;
        sobel_ld_addr = ADDR_W'(r * IMG_W + c);
        sobel_ld_pix = 1'(img[r][c]);
        n_load++;
      end
    @(negedge clk) sobel_ld_we = 0;
    @(negedge clk) sobel_start = 1;
    @(posedge clk);
    #1 start_cyc = cyc;
    @(negedge clk) sobel_start = 0;
    repeat (200) @(negedge clk);
    // the pixel at (10, 10) has not been read yet: this write must not land
    sobel_ld_we = 1;
    sobel_ld_addr = ADDR_W'(10 * IMG_W + 10);
    sobel_ld_pix = 1'(1 - img[10][10]);
    sobel_start = 1;
    n_ignored_ld++;
    n_ignored_start++;
    @(negedge clk);
    sobel_ld_we = 0;
    sobel_start = 0;
    wait (done_cyc >= 0);
    repeat (5) @(negedge clk);
    checks++;
    if (done_cyc - start_cyc != N + 3) begin
      failures++;
      $display("FAIL scan took %0d edges, expected %0d", done_cyc - start_cyc, N + 3);
    end
    checks++;
    if (n_out != (IMG_W - 2) * (IMG_H - 2)) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", n_out, (IMG_W - 2) * (IMG_H - 2));
    end
    checks++;
    if (sobel_busy) begin
      failures++;
      $display("FAIL busy after done");
    end
    sobel_finished = 1;
  end

  // ------------------------------------------------------------ MAC stimulus and check
  initial begin
    int step;
    step = 0;
    repeat (3) @(posedge clk);
    #1;
    while (!sobel_finished) begin
      int phase;
      phase = step % 2000;
      mac_multiplier = 8'($urandom);
      mac_multiplicand = 8'($urandom);
      mac_en = ($urandom_range(0, 9) != 0);
      mac_clr = (phase % 16 == 0);
      if (phase == 17) begin
        mac_clr = 1;
        mac_en = 0;
      end
      if (phase >= 1000 && phase < 1400) begin
        // long run of large products: 400 * 255*255 > 2^24 wraps the accumulator
        mac_clr = (phase == 1000);
        mac_en = 1;
        mac_multiplier = 8'hFF;
        mac_multiplicand = 8'hFF;
      end
      @(posedge clk);
      if (mac_clr && mac_en) begin
        mac_model = longint'(mac_multiplier) * longint'(mac_multiplicand);
        n_mac_load++;
      end else if (mac_clr) begin
        mac_model = 0;
        n_mac_clr++;
      end else if (mac_en) begin
        mac_model += longint'(mac_multiplier) * longint'(mac_multiplicand);
        n_mac_acc++;
        if (mac_model >= (longint'(1) << ACC_W)) n_mac_wrap++;
      end else begin
        n_mac_hold++;
      end
      mac_model = mac_model % (longint'(1) << ACC_W);
      #1;
      checks++;
      if (longint'(mac_result) != mac_model) begin
        failures++;
        if (failures < 10) $display("FAIL mac step %0d got %0d expected %0d", step, mac_result, mac_model);
      end
      step++;
    end
    mac_en = 0;
    mac_clr = 0;

    $display("mechanisms: loads=%0d ignored_loads=%0d ignored_starts=%0d outputs=%0d edges=%0d flat=%0d edge_row_windows=%0d",
             n_load, n_ignored_ld, n_ignored_start, n_out, n_edge, n_flat, n_border_rows);
    $display("mechanisms: mac_clear=%0d mac_clear_load=%0d mac_accumulate=%0d mac_hold=%0d mac_wrap=%0d",
             n_mac_clr, n_mac_load, n_mac_acc, n_mac_hold, n_mac_wrap);
    if (n_load == 0 || n_ignored_ld == 0 || n_ignored_start == 0 || n_edge == 0 || n_flat == 0
        || n_border_rows == 0 || n_mac_clr == 0 || n_mac_load == 0 || n_mac_acc == 0
        || n_mac_hold == 0 || n_mac_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
