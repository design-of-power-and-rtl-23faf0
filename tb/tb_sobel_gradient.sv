// tb_sobel_gradient: random 3x3 windows of 6-bit pixels, plus the all-max
// corner cases, against the Sobel gradients written out term by term:
//   gx = (p00 + 2 p10 + p20) - (p02 + 2 p12 + p22)
//   gy = (p20 + 2 p21 + p22) - (p00 + 2 p01 + p02)
module tb_sobel_gradient;
  localparam int PIX_W = 6, GW = PIX_W + 4;
  logic [PIX_W-1:0] win [3][3];
  logic signed [GW-1:0] gx, gy;
  int checks = 0, failures = 0;

  sobel_gradient #(.PIX_W(PIX_W)) dut (.win(win), .gx(gx), .gy(gy));

  task automatic run_one();
    int p [3][3];
    int ex, ey;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) p[i][j] = int'(win[i][j]);
    ex = (p[0][0] + 2 * p[1][0] + p[2][0]) - (p[0][2] + 2 * p[1][2] + p[2][2]);
    ey = (p[2][0] + 2 * p[2][1] + p[2][2]) - (p[0][0] + 2 * p[0][1] + p[0][2]);
    #1;
    checks += 2;
    if (int'(gx) != ex) begin failures++; $display("FAIL gx %0d expected %0d", gx, ex); end
    if (int'(gy) != ey) begin failures++; $display("FAIL gy %0d expected %0d", gy, ey); end
  endtask

  initial begin
    for (int k = 0; k < 5000; k++) begin
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) win[i][j] = PIX_W'($urandom);
      run_one();
    end
    // extreme gradients: one half of the window at max, the other at zero
    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          case (k)
            0: win[i][j] = (j == 0) ? '1 : '0;
            1: win[i][j] = (j == 2) ? '1 : '0;
            2: win[i][j] = (i == 0) ? '1 : '0;
            default: win[i][j] = (i == 2) ? '1 : '0;
          endcase
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
