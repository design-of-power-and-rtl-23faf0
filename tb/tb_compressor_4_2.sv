// tb_compressor_4_2: exhaustive check of the exact 4-2 compressor.
// All 32 input combinations; for each, x1+x2+x3+x4+cin must equal
// sum + 2*(carry + cout), and cout must not depend on cin (the property that
// keeps a compressor row free of a ripple path).
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin;
  logic sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.*);

  initial begin
    logic cout_cin0;
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      checks++;
      if (int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin)
          != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
        failures++;
        $display("FAIL in=%05b sum=%0d carry=%0d cout=%0d", v[4:0], sum, carry, cout);
      end
      if (cin == 1'b0) begin
        cout_cin0 = cout;
      end else begin
        checks++;
        if (cout != cout_cin0) begin
          failures++;
          $display("FAIL cout depends on cin for in=%05b", v[4:0]);
        end
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
