// data_mapper_tb: self-checking test of the data mapping controller.
// Captures every BPT and APT write into local copies of the tables. After
// each mapping sweep it recomputes, from its own copy of the ternary
// table, which sub-words each partition holds, their ranks, the Last Index
// of every BPT row and the APT row of every present sub-word, and compares.
// Also checks that a sweep lasts 2^SW cycles, that the empty tables after
// reset hold LI = -1 everywhere, that hold and busy block writes, and that
// deleting an entry removes it.
module data_mapper_tb;
  localparam int unsigned W = 16, N = 16, K = 2, P = 4, SW = W / K, RB = 1 << P;
  localparam int unsigned ROWS = 1 << (SW - P);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                wr_valid = 0, wr_ready, wr_keep = 0, hold = 0, busy;
  logic [3:0]          wr_addr = 0;
  logic [W-1:0]        wr_value = 0, wr_xmask = 0;
  logic [K-1:0]        bpt_wr_en, apt_wr_en;
  logic [SW-P-1:0]     bpt_wr_row;
  logic [RB-1:0]       bpt_wr_bits [K];
  logic signed [SW:0]  bpt_wr_li   [K];
  logic [SW-1:0]       apt_wr_addr [K];
  logic [N-1:0]        apt_wr_data [K];

  data_mapper #(.W(W), .N(N), .K(K), .P(P)) dut (.*);

  // local copies of what was written
  logic [RB-1:0]       m_bits [K][ROWS];
  logic signed [SW:0]  m_li   [K][ROWS];
  logic [N-1:0]        m_apt  [K][1 << SW];
  // reference ternary table
  logic [W-1:0] r_val [N], r_xm [N];
  logic [N-1:0] r_vld = '0;
  int checks = 0, failures = 0, busy_cycles = 0;

  always @(posedge clk) begin
    for (int i = 0; i < K; i++) begin
      if (bpt_wr_en[i]) begin m_bits[i][bpt_wr_row] <= bpt_wr_bits[i]; m_li[i][bpt_wr_row] <= bpt_wr_li[i]; end
      if (apt_wr_en[i]) m_apt[i][apt_wr_addr[i]] <= apt_wr_data[i];
    end
    if (busy && rst_n) busy_cycles++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic verify();
    for (int i = 0; i < K; i++) begin
      int rank = 0;
      for (int v = 0; v < (1 << SW); v++) begin
        logic [N-1:0] m;
        for (int j = 0; j < N; j++)
          m[j] = r_vld[j] && (((SW'(v) ^ r_val[j][W-1-i*SW -: SW]) & ~r_xm[j][W-1-i*SW -: SW]) == 0);
        if (v % RB == 0)
          check(m_li[i][v / RB] == rank - 1, $sformatf("LI p%0d row %0d = %0d exp %0d", i, v / RB, m_li[i][v / RB], rank - 1));
        check(m_bits[i][v / RB][v % RB] == (m != 0), $sformatf("bit p%0d v=%h", i, v));
        if (m != 0) begin
          check(m_apt[i][rank] == m, $sformatf("APT p%0d rank %0d = %h exp %h", i, rank, m_apt[i][rank], m));
          rank++;
        end
      end
    end
  endtask

  task automatic wait_idle();
    busy_cycles = 0;
    @(negedge clk);
    while (busy) @(negedge clk);
    check(busy_cycles == (1 << SW), $sformatf("sweep took %0d cycles", busy_cycles));
  endtask

  task automatic write(input int a, input logic [W-1:0] v, input logic [W-1:0] x, input bit keep);
    @(negedge clk);
    wr_valid = 1; wr_addr = 4'(a); wr_value = v; wr_xmask = x; wr_keep = keep;
    while (!wr_ready) @(negedge clk);
    @(negedge clk);
    wr_valid = 0;
    r_val[a] = v; r_xm[a] = x; r_vld[a] = keep;
    check(busy, "busy after accepted write");
    wait_idle();
    verify();
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(busy, "sweep runs after reset");
    check(!wr_ready, "no write during sweep");
    wait_idle();
    verify();
    // hold blocks a write
    @(negedge clk); hold = 1; wr_valid = 1; wr_addr = 0; wr_value = 16'h1234; wr_keep = 1;
    repeat (3) begin @(negedge clk); check(!wr_ready && !busy, "hold blocks write"); end
    wr_valid = 0; hold = 0;
    // paper-style entries and random ternary entries
    write(8, 16'b1000011110000111, '0, 1);
    write(3, 16'b1000011100000000, 16'h000F, 1);
    for (int t = 0; t < 20; t++)
      write($urandom_range(0, N - 1), W'($urandom), W'($urandom) & W'($urandom) & W'($urandom), 1);
    write(8, 0, 0, 0);
    write(5, 16'h00FF, 16'hFF00, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
