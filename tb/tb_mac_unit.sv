// tb_mac_unit: random multiply-accumulate sequences against an integer model.
// Uses a 20-bit accumulator so that wrap-around happens within the test.
// Covers clear alone, clear with enable (load), hold with enable low,
// accumulation and reset; the result must be visible one clock after the
// term is presented.
module tb_mac_unit;
  localparam int ACC_W = 20;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [7:0] multiplier = 0, multiplicand = 0;
  logic [ACC_W-1:0] mac_result;
  int checks = 0, failures = 0;
  int n_clr = 0, n_load = 0, n_acc = 0, n_hold = 0, n_wrap = 0;
  longint model;

  mac_unit #(.ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (mac_result != 0) failures++;
    for (int i = 0; i < 4000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      en  = (r < 85);
      clr = (r >= 95) || (r < 3);
      multiplier   = 8'($urandom);
      multiplicand = 8'($urandom);
      if (i % 50 < 10) begin
        multiplier = 8'hFF;
        multiplicand = 8'($urandom_range(200, 255));
      end
      @(posedge clk);
      if (clr && en) begin
        model = longint'(multiplier) * longint'(multiplicand); n_load++;
      end else if (clr) begin
        model = 0; n_clr++;
      end else if (en) begin
        model = model + longint'(multiplier) * longint'(multiplicand);
        n_acc++;
        if (model >= (longint'(1) << ACC_W)) n_wrap++;
      end else begin
        n_hold++;
      end
      model = model % (longint'(1) << ACC_W);
      #1;
      checks++;
      if (longint'(mac_result) != model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: got %0d expected %0d", i, mac_result, model);
      end
    end
    // asynchronous reset clears the accumulator
    rst_n = 0;
    #1;
    checks++;
    if (mac_result != 0) failures++;
    if (n_clr == 0 || n_load == 0 || n_acc == 0 || n_hold == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL coverage clr=%0d load=%0d acc=%0d hold=%0d wrap=%0d",
               n_clr, n_load, n_acc, n_hold, n_wrap);
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
