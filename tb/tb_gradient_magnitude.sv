// tb_gradient_magnitude: gradient magnitude for 6-bit pixels (gradients in
// [-252, 252]). Every gx in range is paired with random gy values and with
// the extremes; the result m must satisfy m*m <= gx^2+gy^2 < (m+1)*(m+1).
module tb_gradient_magnitude;
  localparam int GW = 10;
  logic signed [GW-1:0] gx, gy;
  logic [8:0] mag;
  int checks = 0, failures = 0;

  gradient_magnitude #(.GW(GW)) dut (.gx(gx), .gy(gy), .mag(mag));

  task automatic run_one(input int a, input int b);
    longint s, m;
    gx = GW'(a);
    gy = GW'(b);
    #1;
    s = longint'(a) * a + longint'(b) * b;
    m = longint'(mag);
    checks++;
    if (!(m * m <= s && s < (m + 1) * (m + 1))) begin
      failures++;
      if (failures < 10) $display("FAIL gx=%0d gy=%0d mag=%0d", a, b, mag);
    end
  endtask

  initial begin
    for (int a = -252; a <= 252; a++) begin
      run_one(a, 252);
      run_one(a, -252);
      run_one(a, 0);
      for (int k = 0; k < 20; k++) run_one(a, $urandom_range(0, 504) - 252);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
