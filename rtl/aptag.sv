// aptag: APT Address Generator of one vertical partition.
//
// A 1's counter counts the set bits of the selected BPT row from bit 0 up
// to and including the bit at BPI; an adder adds the row's Last Index. The
// sum is the APT address (APTA) of the searched sub-word: its rank among
// all present sub-words of the partition. Both parts follow the reference
// design; counting the BPI bit itself (so that LI = -1 plus one gives row 0)
// is this design's reading.
//
// Purely combinational. The result is only meaningful when the BPI bit is
// set; it is then in 0 .. 2^SW-1 and truncating to SW bits is exact.
module aptag #(
  parameter int unsigned SW = 8,
  parameter int unsigned P  = 4
) (
  input  logic [(1<<P)-1:0]  bits,
  input  logic signed [SW:0] li,
  input  logic [P-1:0]       bpi,
  output logic [SW-1:0]      apta
);

  localparam int unsigned CW = P + 1;  // counter width, holds 0 .. 2^P

  logic [CW-1:0]      ones;
  logic signed [SW:0] sum;

  // 1's counter over bits [0 .. bpi]
  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < (1 << P); i++)
      if (i <= 32'(bpi) && bits[i]) ones = ones + CW'(1);
  end

  // adder: Last Index + count
  assign sum  = li + $signed({{(SW-CW+1){1'b0}}, ones});
  assign apta = sum[SW-1:0];

endmodule
