// tb_compressor_multiplier: exhaustive check of the 8x8 multiplier.
// Every one of the 65536 operand pairs is applied and the 16-bit product is
// compared with the integer product x*y.
module tb_compressor_multiplier;
  logic [7:0]  x, y;
  logic [15:0] product;
  int checks = 0, failures = 0;

  compressor_multiplier dut (.x(x), .y(y), .product(product));

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x = 8'(a);
        y = 8'(b);
        #1;
        checks++;
        if (int'(product) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d gave %0d", a, b, product);
        end
      end
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
