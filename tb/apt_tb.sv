// apt_tb: self-checking test of the Address Position Table.
// Fills every row with random data, then reads random rows (with writes
// to other rows mixed in) and compares with a copy kept here.
module apt_tb;
  localparam int unsigned SW = 8, N = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          wr_en = 0, rd_en = 0;
  logic [SW-1:0] wr_addr, rd_addr;
  logic [N-1:0]  wr_data, rd_data;
  logic [N-1:0]  ref_mem [1 << SW];
  int checks = 0, failures = 0;

  apt #(.SW(SW), .N(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << SW); a++) begin
      @(negedge clk); wr_en = 1; wr_addr = SW'(a); wr_data = N'($urandom); ref_mem[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 500; t++) begin
      logic [SW-1:0] a;
      a = SW'($urandom);
      @(negedge clk);
      rd_en = 1; rd_addr = a;
      wr_en = 1; wr_addr = a + 1'b1; wr_data = N'($urandom);
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_data !== ref_mem[a]) begin
        failures++;
        $display("FAIL a=%0d got=%h exp=%h", a, rd_data, ref_mem[a]);
      end
      ref_mem[SW'(a + 1)] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
