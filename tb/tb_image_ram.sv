// tb_image_ram: writes random words, reads them back with one cycle of read
// latency, checks that rdata holds while re is low, and that a read and
// write to the same address in one cycle return the old word.
module tb_image_ram;
  localparam int DATA_W = 4, DEPTH = 64, ADDR_W = 6;
  logic clk = 0, we = 0, re = 0;
  logic [ADDR_W-1:0] waddr = 0, raddr = 0;
  logic [DATA_W-1:0] wdata = 0, rdata;
  logic [DATA_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  image_ram #(.DATA_W(DATA_W), .DEPTH(DEPTH), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [DATA_W-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, rdata, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = ADDR_W'(a); wdata = DATA_W'($urandom); model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int k = 0; k < 200; k++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      re = 1; raddr = ADDR_W'(a);
      @(negedge clk);
      re = 0;
      check(model[a], "read");
      raddr = ADDR_W'(a ^ 1);
      @(negedge clk);
      check(model[a], "hold");
    end
    // read-during-write of one address returns the old word
    @(negedge clk);
    we = 1; re = 1; waddr = 5; raddr = 5; wdata = ~model[5];
    @(negedge clk);
    we = 0; re = 0;
    check(model[5], "read-during-write");
    model[5] = ~model[5];
    @(negedge clk) re = 1; raddr = 5;
    @(negedge clk) re = 0;
    check(model[5], "new word");
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
