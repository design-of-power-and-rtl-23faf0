// full_adder: one-bit full adder, the 3:2 counter used inside the 4-2
// compressor. Purely combinational: {cout, s} = a + b + c.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ c;
    cout = (a & b) | (a & c) | (b & c);
  end
endmodule
