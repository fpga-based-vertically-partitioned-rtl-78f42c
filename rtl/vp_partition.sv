// vp_partition: search path of one vertical partition.
//
// The search sub-word addresses the Bit Position Table (BPT); the APT
// Address Generator (APTAG) turns the row read out into the APT address;
// the Address Position Table (APT) row read there is the partition's
// partial match vector (PMA), one bit per TCAM address. If the BPT bit at
// the bit position indicator is clear, the sub-word occurs in no entry of
// this partition and the PMA is forced to zero. The chain BPT -> APTAG ->
// APT follows the reference design; the two-stage pipeline and gating the
// PMA with the activation bit are this design's choices.
//
// Timing: a sub-word presented with srch_valid in cycle t gives pma with
// pma_valid in cycle t+2; one search per cycle. The write ports come from
// the data mapper and are passed to the two memories.
module vp_partition #(
  parameter int unsigned SW = 8,
  parameter int unsigned P  = 4,
  parameter int unsigned N  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // search
  input  logic                 srch_valid,
  input  logic [SW-1:0]        subword,
  output logic                 pma_valid,
  output logic [N-1:0]         pma,
  // BPT write port
  input  logic                 bpt_wr_en,
  input  logic [SW-P-1:0]      bpt_wr_row,
  input  logic [(1<<P)-1:0]    bpt_wr_bits,
  input  logic signed [SW:0]   bpt_wr_li,
  // APT write port
  input  logic                 apt_wr_en,
  input  logic [SW-1:0]        apt_wr_addr,
  input  logic [N-1:0]         apt_wr_data
);

  logic                v1_q, v2_q, act2_q;
  logic [(1<<P)-1:0]   row_bits;
  logic signed [SW:0]  row_li;
  logic [P-1:0]        row_bpi;
  logic                act1;
  logic [SW-1:0]       apta;
  logic [N-1:0]        apt_row;

  bpt #(.SW(SW), .P(P)) u_bpt (
    .clk        (clk),
    .wr_en      (bpt_wr_en),
    .wr_row     (bpt_wr_row),
    .wr_bits    (bpt_wr_bits),
    .wr_li      (bpt_wr_li),
    .rd_en      (srch_valid),
    .rd_subword (subword),
    .rd_bits    (row_bits),
    .rd_li      (row_li),
    .rd_bpi     (row_bpi),
    .rd_active  (act1)
  );

  aptag #(.SW(SW), .P(P)) u_aptag (
    .bits (row_bits),
    .li   (row_li),
    .bpi  (row_bpi),
    .apta (apta)
  );

  apt #(.SW(SW), .N(N)) u_apt (
    .clk     (clk),
    .wr_en   (apt_wr_en),
    .wr_addr (apt_wr_addr),
    .wr_data (apt_wr_data),
    .rd_en   (v1_q),
    .rd_addr (apta),
    .rd_data (apt_row)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q   <= 1'b0;
      v2_q   <= 1'b0;
      act2_q <= 1'b0;
    end else begin
      v1_q <= srch_valid;
      v2_q <= v1_q;
      if (v1_q) act2_q <= act1;
    end
  end

  assign pma_valid = v2_q;
  assign pma       = act2_q ? apt_row : '0;

endmodule
