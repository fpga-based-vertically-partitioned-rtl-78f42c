// vp_tcam: vertically partitioned, SRAM-based ternary CAM.
//
// A ternary table of N entries of W bits is cut column-wise into K
// vertical partitions of SW = W/K bits. Each partition keeps a Bit Position
// Table (BPT), which records which binary sub-words occur in its column,
// and an Address Position Table (APT), which lists for each occurring
// sub-word the TCAM addresses holding it (don't-care bits already
// expanded). A search splits the key into K sub-words, looks each up in
// its partition in parallel, ANDs the K partial match vectors and passes
// the result to a priority encoder. The architecture follows the reference
// design; the pipeline, the hardware mapping sweep and the port protocol
// are this design's choices.
//
// Search: a key is taken when srch_valid && srch_ready; three cycles later
// res_valid is high with res_hit, res_addr (lowest matching address) and
// res_ma (all matching addresses, bit j = address j). One key per cycle.
// srch_ready is low while the tables are being rebuilt (busy).
// Write: an entry is taken when wr_valid && wr_ready (wr_keep 1 = store,
// 0 = delete, wr_xmask bit 1 = don't care). Each write rebuilds the tables
// in 2^SW cycles, during which busy is high. After reset the tables are
// rebuilt once (empty) before the first search is accepted. A write is
// held off while searches are in the pipeline; searches win over writes.
module vp_tcam
  import tcam_pkg::*;
#(
  parameter int unsigned W = DEF_W,
  parameter int unsigned N = DEF_N,
  parameter int unsigned K = DEF_K,
  parameter int unsigned P = DEF_P,
  localparam int unsigned SW = W / K,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // entry write
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_value,
  input  logic [W-1:0]  wr_xmask,
  input  logic          wr_keep,
  output logic          busy,
  // search
  input  logic          srch_valid,
  output logic          srch_ready,
  input  logic [W-1:0]  srch_key,
  output logic          res_valid,
  output logic          res_hit,
  output logic [AW-1:0] res_addr,
  output logic [N-1:0]  res_ma
);

  logic [K-1:0]        bpt_wr_en;
  logic [SW-P-1:0]     bpt_wr_row;
  logic [(1<<P)-1:0]   bpt_wr_bits [K];
  logic signed [SW:0]  bpt_wr_li   [K];
  logic [K-1:0]        apt_wr_en;
  logic [SW-1:0]       apt_wr_addr [K];
  logic [N-1:0]        apt_wr_data [K];

  logic                srch_go;
  logic [K-1:0]        pma_valid;
  logic [N-1:0]        pma [K];
  logic [N-1:0]        ma;
  logic                pe_hit;
  logic [AW-1:0]       pe_addr;
  logic [1:0]          inflight;
  logic                hold;

  assign srch_ready = !busy;
  assign srch_go    = srch_valid && srch_ready;
  assign hold       = srch_valid || (|inflight);

  data_mapper #(.W(W), .N(N), .K(K), .P(P)) u_mapper (
    .clk         (clk),
    .rst_n       (rst_n),
    .wr_valid    (wr_valid),
    .wr_ready    (wr_ready),
    .wr_addr     (wr_addr),
    .wr_value    (wr_value),
    .wr_xmask    (wr_xmask),
    .wr_keep     (wr_keep),
    .hold        (hold),
    .busy        (busy),
    .bpt_wr_en   (bpt_wr_en),
    .bpt_wr_row  (bpt_wr_row),
    .bpt_wr_bits (bpt_wr_bits),
    .bpt_wr_li   (bpt_wr_li),
    .apt_wr_en   (apt_wr_en),
    .apt_wr_addr (apt_wr_addr),
    .apt_wr_data (apt_wr_data)
  );

  for (genvar i = 0; i < K; i++) begin : g_vp
    vp_partition #(.SW(SW), .P(P), .N(N)) u_vp (
      .clk         (clk),
      .rst_n       (rst_n),
      .srch_valid  (srch_go),
      .subword     (srch_key[W-1-i*SW -: SW]),
      .pma_valid   (pma_valid[i]),
      .pma         (pma[i]),
      .bpt_wr_en   (bpt_wr_en[i]),
      .bpt_wr_row  (bpt_wr_row),
      .bpt_wr_bits (bpt_wr_bits[i]),
      .bpt_wr_li   (bpt_wr_li[i]),
      .apt_wr_en   (apt_wr_en[i]),
      .apt_wr_addr (apt_wr_addr[i]),
      .apt_wr_data (apt_wr_data[i])
    );
  end

  pma_and #(.K(K), .N(N)) u_and (
    .pma (pma),
    .ma  (ma)
  );

  priority_encoder #(.N(N)) u_pe (
    .vec  (ma),
    .hit  (pe_hit),
    .addr (pe_addr)
  );

  // searches in the first two pipeline stages, used to hold off writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= {inflight[0], srch_go};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_addr  <= '0;
      res_ma    <= '0;
    end else begin
      res_valid <= pma_valid[0];
      if (pma_valid[0]) begin
        res_hit  <= pe_hit;
        res_addr <= pe_addr;
        res_ma   <= ma;
      end
    end
  end

  // the tables must never be rewritten while a search uses them
  a_no_write_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    (|inflight) |-> !(|bpt_wr_en) && !(|apt_wr_en));

endmodule
