// bpt_tb: self-checking test of the Bit Position Table.
// Writes every row with random presence bits and Last Index, keeping a
// copy, then reads random sub-words and checks row bits, LI, BPI and the
// activation bit one cycle after the read; also checks a row rewrite.
module bpt_tb;
  localparam int unsigned SW = 8, P = 4, ROWS = 1 << (SW - P);
  logic clk = 0;
  always #5 clk = ~clk;

  logic                wr_en = 0, rd_en = 0;
  logic [SW-P-1:0]     wr_row;
  logic [(1<<P)-1:0]   wr_bits, rd_bits;
  logic signed [SW:0]  wr_li, rd_li;
  logic [SW-1:0]       rd_subword;
  logic [P-1:0]        rd_bpi;
  logic                rd_active;
  int checks = 0, failures = 0;

  logic [(1<<P)-1:0]  ref_bits [ROWS];
  logic signed [SW:0] ref_li   [ROWS];

  bpt #(.SW(SW), .P(P)) dut (.*);

  task automatic wr(input int r, input logic [(1<<P)-1:0] b, input logic signed [SW:0] l);
    @(negedge clk); wr_en = 1; wr_row = r[SW-P-1:0]; wr_bits = b; wr_li = l;
    ref_bits[r] = b; ref_li[r] = l;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd_check(input logic [SW-1:0] sw);
    logic [P-1:0] b;
    @(negedge clk); rd_en = 1; rd_subword = sw;
    @(negedge clk); rd_en = 0; rd_subword = ~sw;   // output must hold
    b = sw[P-1:0];
    checks++;
    if (rd_bits !== ref_bits[sw[SW-1:P]] || rd_li !== ref_li[sw[SW-1:P]] ||
        rd_bpi !== b || rd_active !== ref_bits[sw[SW-1:P]][b]) begin
      failures++;
      $display("FAIL sw=%h bits=%h/%h li=%0d/%0d act=%b", sw, rd_bits,
               ref_bits[sw[SW-1:P]], rd_li, ref_li[sw[SW-1:P]], rd_active);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) wr(r, 16'($urandom), 9'($signed($urandom_range(0, 300)) - 1));
    for (int t = 0; t < 300; t++) rd_check(SW'($urandom));
    wr(5, 16'h0001, -1);
    for (int b = 0; b < 16; b++) rd_check({4'd5, 4'(b)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
