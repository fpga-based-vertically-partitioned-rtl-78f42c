// data_mapper: conventional ternary table and data mapping phase.
//
// Holds the ternary table as registers: per entry a value, a don't-care
// mask (bit 1 = X) and a valid flag. After reset and after every accepted
// entry write it runs one mapping sweep, which rebuilds the BPT and APT of
// all K partitions from the table. The sweep walks all 2^SW binary sub-word
// values v in ascending order, one per cycle, all partitions at once. For
// partition i it compares v with sub-word i of every valid entry, honouring
// X bits (this is the expansion of each ternary sub-word into its binary
// counterparts). If any entry matches, v is present: the match vector is
// written to APT row rank_i (the count of present values so far), and the
// presence bit of v is set in its BPT row. When the last value of a BPT row
// has been seen, the row is written together with its Last Index, the
// rank at the row's start minus one (so -1 for an empty table). The table
// contents that result follow the reference design; doing the mapping in
// hardware by this sweep, and the write interface, are this design's own.
//
// Interface: an entry write is taken when wr_valid && wr_ready. wr_keep = 1
// stores the entry, wr_keep = 0 deletes it. wr_ready is low while a sweep
// runs (busy) and while hold is high (searches still in the search
// pipeline). A sweep lasts 2^SW cycles and starts the cycle after the write.
module data_mapper
  import tcam_pkg::*;
#(
  parameter int unsigned W = DEF_W,
  parameter int unsigned N = DEF_N,
  parameter int unsigned K = DEF_K,
  parameter int unsigned P = DEF_P,
  localparam int unsigned SW = W / K,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // entry write
  input  logic                 wr_valid,
  output logic                 wr_ready,
  input  logic [AW-1:0]        wr_addr,
  input  logic [W-1:0]         wr_value,
  input  logic [W-1:0]         wr_xmask,
  input  logic                 wr_keep,
  input  logic                 hold,
  output logic                 busy,
  // BPT write ports, one per partition
  output logic [K-1:0]         bpt_wr_en,
  output logic [SW-P-1:0]      bpt_wr_row,
  output logic [(1<<P)-1:0]    bpt_wr_bits [K],
  output logic signed [SW:0]   bpt_wr_li   [K],
  // APT write ports, one per partition
  output logic [K-1:0]         apt_wr_en,
  output logic [SW-1:0]        apt_wr_addr [K],
  output logic [N-1:0]         apt_wr_data [K]
);

  localparam int unsigned RB = 1 << P;

  map_state_e         state;
  logic [W-1:0]       tbl_value [N];
  logic [W-1:0]       tbl_xmask [N];
  logic [N-1:0]       tbl_valid;

  logic [SW-1:0]      v;
  logic [SW:0]        rank      [K];
  logic [SW:0]        row_start [K];
  logic [RB-1:0]      row_acc   [K];

  logic [N-1:0]       mv        [K];
  logic [K-1:0]       present;
  logic [RB-1:0]      bits_now  [K];
  logic [SW:0]        start_now [K];
  logic [P-1:0]       bpi;
  logic               row_first, row_last;

  assign busy      = (state == MAP_SWEEP);
  assign wr_ready  = (state == MAP_IDLE) && !hold;
  assign bpi       = v[P-1:0];
  assign row_first = (bpi == '0);
  assign row_last  = (bpi == '1);

  // match vectors of the current sweep value against every partition
  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        logic [SW-1:0] sv, sx;
        sv = tbl_value[j][W-1-i*SW -: SW];
        sx = tbl_xmask[j][W-1-i*SW -: SW];
        mv[i][j] = tbl_valid[j] && (((v ^ sv) & ~sx) == '0);
      end
      present[i]   = |mv[i];
      bits_now[i]  = (row_first ? '0 : row_acc[i]) | (RB'(present[i]) << bpi);
      start_now[i] = row_first ? rank[i] : row_start[i];
    end
  end

  // table write ports
  always_comb begin
    bpt_wr_row = v[SW-1:P];
    for (int unsigned i = 0; i < K; i++) begin
      bpt_wr_en[i]   = busy && row_last;
      bpt_wr_bits[i] = bits_now[i];
      bpt_wr_li[i]   = $signed(start_now[i]) - 1;
      apt_wr_en[i]   = busy && present[i];
      apt_wr_addr[i] = rank[i][SW-1:0];
      apt_wr_data[i] = mv[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= MAP_SWEEP;   // initialise the tables after reset
      v         <= '0;
      tbl_valid <= '0;
      for (int unsigned j = 0; j < N; j++) begin
        tbl_value[j] <= '0;
        tbl_xmask[j] <= '0;
      end
      for (int unsigned i = 0; i < K; i++) begin
        rank[i]      <= '0;
        row_start[i] <= '0;
        row_acc[i]   <= '0;
      end
    end else begin
      unique case (state)
        MAP_IDLE: begin
          if (wr_valid && wr_ready) begin
            tbl_value[wr_addr] <= wr_value;
            tbl_xmask[wr_addr] <= wr_xmask;
            tbl_valid[wr_addr] <= wr_keep;
            state <= MAP_SWEEP;
            v     <= '0;
            for (int unsigned i = 0; i < K; i++) rank[i] <= '0;
          end
        end
        MAP_SWEEP: begin
          for (int unsigned i = 0; i < K; i++) begin
            rank[i]      <= rank[i] + (SW+1)'(present[i]);
            row_start[i] <= start_now[i];
            row_acc[i]   <= bits_now[i];
          end
          if (v == '1) state <= MAP_IDLE;
          v <= v + 1'b1;
        end
        default: state <= MAP_IDLE;
      endcase
    end
  end

endmodule
