// pma_and_tb: self-checking test of the partial-match AND with K = 3.
module pma_and_tb;
  localparam int unsigned K = 3, N = 16;
  logic [N-1:0] pma [K];
  logic [N-1:0] ma;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  pma_and #(.K(K), .N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [N-1:0] e;
      e = '1;
      for (int i = 0; i < K; i++) begin
        pma[i] = N'($urandom) | N'($urandom);
        for (int b = 0; b < N; b++) if (!pma[i][b]) e[b] = 1'b0;
      end
      #1;
      checks++;
      if (ma !== e) begin
        failures++;
        $display("FAIL ma=%h exp=%h", ma, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
