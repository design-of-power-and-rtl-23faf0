// compressor_4_2: exact 4-2 compressor.
//
// Takes four bits x1..x4 of one column plus a carry-in from the next lower
// column and returns a sum bit of the same weight and two bits (carry, cout)
// of double weight, so that x1+x2+x3+x4+cin = sum + 2*(carry+cout).
// It is built from two full adders: the first adds x1, x2, x3 and produces
// cout, which therefore does not depend on cin, so a row of these cells has
// no ripple path along the cout/cin chain. The second adds the first sum, x4
// and cin.
//
// The multiplier this design follows puts approximate 4-2 compressors in this
// position; their truth tables are not available, so this cell is the exact
// compressor with the same interface. Purely combinational.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2), .c(x3), .s(s1),  .cout(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .c(cin), .s(sum), .cout(carry));
endmodule
