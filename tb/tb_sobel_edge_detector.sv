// tb_sobel_edge_detector: loads random 3-bit images (12x9) into the detector,
// runs two scans and checks every streamed magnitude against a model of the
// Sobel operator (gradients term by term, floor of the Euclidean norm), the
// number and positions of the outputs, and the scan time: done must rise
// IMG_W*IMG_H + 3 clock edges after the edge that samples start.
// During the first scan it also writes the RAM and pulses start again; both
// must be ignored while busy.
module tb_sobel_edge_detector;
  localparam int IMG_W = 12, IMG_H = 9, PIX_W = 3;
  localparam int COL_W = $clog2(IMG_W), ROW_W = $clog2(IMG_H);
  localparam int ADDR_W = $clog2(IMG_W * IMG_H);
  localparam int N = IMG_W * IMG_H;

  logic clk = 0, rst_n = 0;
  logic ld_we = 0;
  logic [ADDR_W-1:0] ld_addr = 0;
  logic [PIX_W-1:0] ld_pix = 0;
  logic start = 0, busy, done, out_valid;
  logic [COL_W-1:0] out_col;
  logic [ROW_W-1:0] out_row;
  logic [8:0] out_mag;

  int img [IMG_H][IMG_W];
  bit seen [IMG_H][IMG_W];
  int checks = 0, failures = 0, nout = 0, cyc = 0, start_cyc = 0, done_cyc = -1;
  int n_nonzero = 0;

  sobel_edge_detector #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

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

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      int r, c;
      r = int'(out_row);
      c = int'(out_col);
      nout++;
      checks++;
      if (r < 1 || r > IMG_H - 2 || c < 1 || c > IMG_W - 2 || seen[r][c]) begin
        failures++;
        $display("FAIL bad or repeated output position (%0d,%0d)", r, c);
      end else begin
        seen[r][c] = 1;
        if (int'(out_mag) != ref_mag(r, c)) begin
          failures++;
          $display("FAIL (%0d,%0d) mag %0d expected %0d", r, c, out_mag, ref_mag(r, c));
        end
        if (out_mag != 0) n_nonzero++;
      end
    end
    if (done) done_cyc = cyc;
  end

  task automatic load_image();
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        img[r][c] = $urandom_range(0, 2) == 0 ? 0 : int'($urandom_range(0, 7));
        @(negedge clk);
        ld_we = 1; ld_addr = ADDR_W'(r * IMG_W + c); ld_pix = PIX_W'(img[r][c]);
      end
    @(negedge clk) ld_we = 0;
  endtask

  task automatic run_scan(input bit disturb);
    for (int r = 0; r < IMG_H; r++) for (int c = 0; c < IMG_W; c++) seen[r][c] = 0;
    nout = 0;
    done_cyc = -1;
    @(negedge clk) start = 1;
    @(posedge clk);
    #1 start_cyc = cyc;
    @(negedge clk) start = 0;
    if (disturb) begin
      repeat (10) @(negedge clk);
      // writes and a second start while busy must be ignored
      ld_we = 1; ld_addr = ADDR_W'(IMG_W + 1); ld_pix = PIX_W'(~img[1][1]);
      start = 1;
      @(negedge clk);
      ld_we = 0; start = 0;
    end
    wait (done_cyc >= 0);
    repeat (5) @(negedge clk);
    checks++;
    if (done_cyc - start_cyc != N + 3) begin
      failures++;
      $display("FAIL scan took %0d edges, expected %0d", done_cyc - start_cyc, N + 3);
    end
    checks++;
    if (nout != (IMG_W - 2) * (IMG_H - 2)) begin
      failures++;
      $display("FAIL %0d outputs", nout);
    end
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy after done");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    load_image();
    run_scan(1);
    load_image();
    run_scan(0);
    checks++;
    if (n_nonzero == 0) begin
      failures++;
      $display("FAIL no edges seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
