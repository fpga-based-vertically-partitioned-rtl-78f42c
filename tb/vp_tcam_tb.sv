// vp_tcam_tb: end-to-end test of the vertically partitioned TCAM at its
// default size (16 entries x 16 bits, two partitions).
// A monitor keeps its own copy of the ternary table, updated on every
// accepted write, and for every accepted key works out the matching
// entries directly from the ternary compare. Each result must arrive
// exactly three cycles after its key, with the right match vector, hit
// flag and lowest matching address. The stimulus runs the reference
// example (key 1000011110000111 matching only entry 8 while entry 3 matches
// the first sub-word too), random ternary tables, back-to-back searches,
// deletes, and writes issued while searches are in flight. Each of these
// events is counted and must happen at least once: hit, miss, multiple
// match, a key present in one partition but not matching overall, a hit
// through don't-care bits, a key refused while the tables are rebuilt, a
// write held back by searches in flight, and a delete.
module vp_tcam_tb;
  localparam int unsigned W = 16, N = 16, K = 2, SW = W / K;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          wr_valid = 0, wr_ready, wr_keep = 0, busy;
  logic [3:0]    wr_addr = 0;
  logic [W-1:0]  wr_value = 0, wr_xmask = 0;
  logic          srch_valid = 0, srch_ready;
  logic [W-1:0]  srch_key = 0;
  logic          res_valid, res_hit;
  logic [3:0]    res_addr;
  logic [N-1:0]  res_ma;

  vp_tcam dut (.*);

  logic [W-1:0] r_val [N], r_xm [N];
  logic [N-1:0] r_vld = '0;
  int checks = 0, failures = 0, cyc = 0;
  int n_hit = 0, n_miss = 0, n_multi = 0, n_partial = 0, n_xhit = 0;
  int n_refused = 0, n_held = 0, n_delete = 0, n_paper = 0;

  // expected results of accepted keys
  logic [N-1:0] q_exp [$];
  logic [W-1:0] q_key [$];
  int           q_cyc [$];

  function automatic logic [N-1:0] ref_match(input logic [W-1:0] key, input int part);
    // part < 0: whole word, else only sub-word part
    logic [W-1:0] msk;
    msk = (part < 0) ? '1 : (W'({SW{1'b1}}) << (W - SW - part * SW));
    for (int j = 0; j < N; j++)
      ref_match[j] = r_vld[j] && ((((key ^ r_val[j]) & ~r_xm[j]) & msk) == 0);
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (res_valid) begin
        logic [N-1:0] e; logic [W-1:0] k; int c, lo;
        if (q_exp.size() == 0) check(0, "result without key");
        else begin
          e = q_exp.pop_front(); k = q_key.pop_front(); c = q_cyc.pop_front();
          lo = -1;
          for (int j = N - 1; j >= 0; j--) if (e[j]) lo = j;
          check(res_ma == e && res_hit == (e != 0) && (e == 0 || res_addr == 4'(lo)) && cyc - c == 3,
                $sformatf("key=%b ma=%h exp=%h hit=%b addr=%0d exp=%0d lat=%0d", k, res_ma, e, res_hit, res_addr, lo, cyc - c));
          // reference example: only entry 8 matches the whole key
          if (k == 16'b1000011110000111 && cyc < 2000) begin
            check(res_hit && res_addr == 8 && res_ma == 16'h0100, "reference example gives address 8 only");
            n_paper++;
          end
        end
      end
      if (srch_valid && !srch_ready) n_refused++;
      if (wr_valid && !wr_ready && !busy) n_held++;
      if (srch_valid && srch_ready) begin
        logic [N-1:0] e;
        e = ref_match(srch_key, -1);
        q_exp.push_back(e); q_key.push_back(srch_key); q_cyc.push_back(cyc);
        if (e == 0) n_miss++; else n_hit++;
        if ($countones(e) > 1) n_multi++;
        if (e == 0) for (int i = 0; i < K; i++) if (ref_match(srch_key, i) != 0) begin n_partial++; break; end
        for (int j = 0; j < N; j++) if (e[j] && r_xm[j] != 0) begin n_xhit++; break; end
      end
      if (wr_valid && wr_ready) begin
        r_val[wr_addr] = wr_value; r_xm[wr_addr] = wr_xmask;
        if (!wr_keep && r_vld[wr_addr]) n_delete++;
        r_vld[wr_addr] = wr_keep;
      end
    end
    cyc++;
  end

  task automatic write(input int a, input logic [W-1:0] v, input logic [W-1:0] x, input bit keep);
    @(negedge clk);
    wr_valid = 1; wr_addr = 4'(a); wr_value = v; wr_xmask = x; wr_keep = keep;
    @(posedge clk);
    while (!wr_ready) @(posedge clk);
    @(negedge clk);
    wr_valid = 0;
  endtask

  task automatic search(input logic [W-1:0] k);
    @(negedge clk);
    srch_valid = 1; srch_key = k;
    @(posedge clk);
    while (!srch_ready) @(posedge clk);
    @(negedge clk);
    srch_valid = 0;
  endtask

  task automatic drain();
    repeat (5) @(negedge clk);
  endtask

  // a key that matches entry j, with its don't-care bits filled at random
  function automatic logic [W-1:0] key_for(input int j);
    return (r_val[j] & ~r_xm[j]) | (W'($urandom) & r_xm[j]);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    search(16'h1234);             // refused until the start-up sweep ends
    drain();
    // reference example
    write(8, 16'b1000011110000111, 16'h0000, 1);
    write(3, 16'b1000011100000000, 16'h000F, 1);
    search(16'b1000011110000111);
    search(16'b1000011100000101);
    search(16'b0000011110000111);
    drain();
    // random tables
    for (int t = 0; t < 6; t++) begin
      for (int j = 0; j < N; j++) begin
        logic [W-1:0] x;
        x = W'($urandom) & W'($urandom) & W'($urandom);
        if (j % 5 == 0) x = x | W'($urandom) & W'($urandom);
        write(j, W'($urandom), x, $urandom_range(0, 9) != 0);
      end
      // back-to-back keys, a write racing them halfway
      fork
        begin
          for (int s = 0; s < 200; s++) begin
            logic [W-1:0] k;
            int j;
            j = $urandom_range(0, N - 1);
            k = ($urandom_range(0, 3) == 0) ? W'($urandom) : key_for(j);
            if ($urandom_range(0, 7) == 0) k[$urandom_range(0, W - 1)] ^= 1'b1;
            @(negedge clk); srch_valid = 1; srch_key = k;
            @(posedge clk);
            while (!srch_ready) @(posedge clk);
          end
          @(negedge clk); srch_valid = 0;
        end
        begin
          repeat (50) @(negedge clk);
          wr_valid = 1; wr_addr = 4'($urandom); wr_value = W'($urandom); wr_xmask = 16'h00F0; wr_keep = 1;
          @(posedge clk);
          while (!wr_ready) @(posedge clk);
          @(negedge clk); wr_valid = 0;
        end
      join
      drain();
      write($urandom_range(0, N - 1), 0, 0, 0);
      write(0, 16'h0000, 16'hFFFF, t % 2);   // catch-all entry every other round
      for (int s = 0; s < 30; s++) search(key_for($urandom_range(0, N - 1)));
      drain();
    end
    check(q_exp.size() == 0, "all keys answered");
    check(n_hit > 0 && n_miss > 0 && n_multi > 0 && n_partial > 0 && n_xhit > 0 &&
          n_refused > 0 && n_held > 0 && n_delete > 0 && n_paper > 0,
          $sformatf("coverage hit=%0d miss=%0d multi=%0d partial=%0d xhit=%0d refused=%0d held=%0d delete=%0d example=%0d",
                    n_hit, n_miss, n_multi, n_partial, n_xhit, n_refused, n_held, n_delete, n_paper));
    $display("events: hit=%0d miss=%0d multi=%0d partial=%0d xhit=%0d refused=%0d held=%0d delete=%0d example=%0d",
             n_hit, n_miss, n_multi, n_partial, n_xhit, n_refused, n_held, n_delete, n_paper);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
