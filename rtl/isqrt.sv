// isqrt: combinational integer square root, root = floor(sqrt(radicand)).
//
// Restoring digit-by-digit method: for each result bit from the top down,
// the trial value (partial root with that bit set) is squared against the
// radicand, and the bit is kept if the square does not exceed it. IN_W-bit
// radicand, OUT_W = ceil(IN_W/2)-bit root. Purely combinational.
module isqrt #(
  parameter int unsigned IN_W  = 17,
  parameter int unsigned OUT_W = (IN_W + 1) / 2
) (
  input  logic [IN_W-1:0]  radicand,
  output logic [OUT_W-1:0] root
);
  always_comb begin
    logic [OUT_W-1:0]   trial;
    logic [2*OUT_W-1:0] sq;
    root = '0;
    for (int b = OUT_W - 1; b >= 0; b--) begin
      trial = root | (OUT_W'(1) << b);
      sq    = (2*OUT_W)'(trial) * (2*OUT_W)'(trial);
      if (sq <= (2*OUT_W)'(radicand)) begin
        root = trial;
      end
    end
  end
endmodule
