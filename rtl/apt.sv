// apt: Address Position Table of one vertical partition.
//
// A synchronous SRAM of 2^SW rows of N bits. Row r belongs to the r-th
// present sub-word of the partition (in ascending value order); bit j is
// set when TCAM entry j matches that sub-word. The table size 2^SW x N
// follows the reference design; the one-cycle synchronous read is this
// design's choice.
//
// Timing: rd_data is valid in the cycle after rd_en.
module apt #(
  parameter int unsigned SW = 8,
  parameter int unsigned N  = 16
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [SW-1:0] wr_addr,
  input  logic [N-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [SW-1:0] rd_addr,
  output logic [N-1:0]  rd_data
);

  logic [N-1:0] mem [1 << SW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
