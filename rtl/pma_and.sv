// pma_and: combines the partial match vectors of the K vertical partitions.
//
// An address matches the whole TCAM word only if every partition reports it,
// so the match vector (MA) is the bitwise AND of the K partial match vectors
// (PMA). This follows the reference design. Combinational.
module pma_and #(
  parameter int unsigned K = 2,
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] pma [K],
  output logic [N-1:0] ma
);

  always_comb begin
    ma = '1;
    for (int unsigned i = 0; i < K; i++) ma &= pma[i];
  end

endmodule
