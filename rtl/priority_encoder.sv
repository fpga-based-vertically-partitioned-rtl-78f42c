// priority_encoder: turns the match vector into one match address.
//
// Several ternary entries can match one key; the lowest-numbered matching
// entry wins (the reference design names a priority encoder but not its
// order; lowest-first is this design's choice). hit is 0 and addr is 0 when
// no bit is set. Combinational.
module priority_encoder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]         vec,
  output logic                 hit,
  output logic [$clog2(N)-1:0] addr
);

  always_comb begin
    hit  = 1'b0;
    addr = '0;
    for (int i = N - 1; i >= 0; i--)
      if (vec[i]) begin
        hit  = 1'b1;
        addr = ($clog2(N))'(i);
      end
  end

endmodule
