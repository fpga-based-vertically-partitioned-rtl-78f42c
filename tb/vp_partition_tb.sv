// vp_partition_tb: self-checking test of one vertical partition.
// For several random ternary sub-tables the BPT and APT contents are built
// here (presence bits, Last Index = rank at row start - 1, APT row = rank)
// and written through the write ports. Then all 2^SW sub-words are searched
// back to back, one per cycle; each PMA must equal the set of entries whose
// ternary sub-word matches, and must arrive exactly two cycles later.
module vp_partition_tb;
  localparam int unsigned SW = 8, P = 4, N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                srch_valid = 0;
  logic [SW-1:0]       subword;
  logic                pma_valid;
  logic [N-1:0]        pma;
  logic                bpt_wr_en = 0;
  logic [SW-P-1:0]     bpt_wr_row;
  logic [(1<<P)-1:0]   bpt_wr_bits;
  logic signed [SW:0]  bpt_wr_li;
  logic                apt_wr_en = 0;
  logic [SW-1:0]       apt_wr_addr;
  logic [N-1:0]        apt_wr_data;

  logic [SW-1:0] val [N], xm [N];
  logic [N-1:0]  vld;
  int checks = 0, failures = 0, absent = 0, present = 0;
  int cyc = 0;

  vp_partition #(.SW(SW), .P(P), .N(N)) dut (.*);

  function automatic logic [N-1:0] match(input logic [SW-1:0] v);
    for (int j = 0; j < N; j++)
      match[j] = vld[j] && (((v ^ val[j]) & ~xm[j]) == 0);
  endfunction

  task automatic load_tables();
    int rank = 0, start = 0;
    logic [(1<<P)-1:0] acc;
    for (int v = 0; v < (1 << SW); v++) begin
      logic [N-1:0] m;
      m = match(SW'(v));
      if (v % (1 << P) == 0) begin start = rank; acc = '0; end
      @(negedge clk);
      apt_wr_en = (m != 0); apt_wr_addr = SW'(rank); apt_wr_data = m;
      if (m != 0) begin acc[v % (1 << P)] = 1'b1; rank++; end
      bpt_wr_en = (v % (1 << P) == (1 << P) - 1);
      bpt_wr_row = (SW-P)'(v >> P); bpt_wr_bits = acc; bpt_wr_li = (SW+1)'(start - 1);
    end
    @(negedge clk); apt_wr_en = 0; bpt_wr_en = 0;
  endtask

  // request log: sub-word and cycle of each search
  logic [SW-1:0] q_sw [$];
  int            q_cy [$];
  always @(posedge clk) begin
    if (srch_valid) begin q_sw.push_back(subword); q_cy.push_back(cyc); end
    if (pma_valid && rst_n) begin
      logic [SW-1:0] s; int c; logic [N-1:0] e;
      s = q_sw.pop_front(); c = q_cy.pop_front();
      e = match(s);
      checks++;
      if (e == 0) absent++; else present++;
      if (pma !== e || cyc - c != 2) begin
        failures++;
        $display("FAIL sw=%h pma=%h exp=%h lat=%0d", s, pma, e, cyc - c);
      end
    end
    cyc++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      for (int j = 0; j < N; j++) begin
        val[j] = SW'($urandom);
        xm[j]  = (t == 0) ? '0 : SW'($urandom) & SW'($urandom) & SW'($urandom);
        vld[j] = ($urandom_range(0, 7) != 0);
      end
      if (t == 5) begin  // everything in one row, everything everywhere
        for (int j = 0; j < N; j++) begin val[j] = 8'h30 | SW'(j); xm[j] = 0; vld[j] = 1; end
        xm[3] = '1;
      end
      load_tables();
      for (int v = 0; v < (1 << SW); v++) begin
        @(negedge clk); srch_valid = 1; subword = SW'(v);
      end
      @(negedge clk); srch_valid = 0;
      repeat (4) @(negedge clk);
    end
    if (absent == 0 || present == 0) begin
      failures++;
      $display("FAIL coverage absent=%0d present=%0d", absent, present);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
