// bpt: Bit Position Table of one vertical partition.
//
// A synchronous SRAM of 2^(SW-P) rows. Each row stores 2^P presence bits,
// one per binary sub-word value, and a signed (SW+1)-bit Last Index (LI):
// the number of present sub-words in all earlier rows, minus one. On a
// search the SW-P high bits of the sub-word (the BPT address, BPTA) select
// a row and the P low bits (the bit position indicator, BPI) select a bit;
// that bit is the partition's activation signal. Row layout and LI follow
// the reference design; P and the one-cycle synchronous read are this
// design's choices.
//
// Timing: rd_bits, rd_li, rd_bpi and rd_active are valid in the cycle after
// rd_en. A write takes effect at the clock edge (read-before-write on a
// same-row collision; the mapper never reads and writes at once).
module bpt #(
  parameter int unsigned SW = 8,
  parameter int unsigned P  = 4
) (
  input  logic                 clk,
  // write port (data mapping phase)
  input  logic                 wr_en,
  input  logic [SW-P-1:0]      wr_row,
  input  logic [(1<<P)-1:0]    wr_bits,
  input  logic signed [SW:0]   wr_li,
  // read port (search phase)
  input  logic                 rd_en,
  input  logic [SW-1:0]        rd_subword,
  output logic [(1<<P)-1:0]    rd_bits,
  output logic signed [SW:0]   rd_li,
  output logic [P-1:0]         rd_bpi,
  output logic                 rd_active
);

  localparam int unsigned ROWS = 1 << (SW - P);
  localparam int unsigned RW   = (1 << P) + SW + 1;

  logic [RW-1:0] mem [ROWS];
  logic [RW-1:0] row_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= {wr_bits, wr_li};
    if (rd_en) begin
      row_q  <= mem[rd_subword[SW-1:P]];
      rd_bpi <= rd_subword[P-1:0];
    end
  end

  assign rd_bits   = row_q[RW-1 -: (1<<P)];
  assign rd_li     = row_q[SW:0];
  assign rd_active = rd_bits[rd_bpi];

endmodule
