// aptag_tb: self-checking test of the APT address generator.
// Exhaustive over BPI for random rows and Last Index values; the expected
// address is the Last Index plus the population count of the row masked
// to bits 0..BPI, computed here with $countones.
module aptag_tb;
  localparam int unsigned SW = 8, P = 4;
  logic [(1<<P)-1:0]  bits;
  logic signed [SW:0] li;
  logic [P-1:0]       bpi;
  logic [SW-1:0]      apta;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  aptag #(.SW(SW), .P(P)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      bits = (t == 0) ? '1 : (t == 1) ? '0 : 16'($urandom);
      li   = (t < 2) ? -1 : 9'($signed($urandom_range(0, 240)) - 1);
      for (int b = 0; b < 16; b++) begin
        int e;
        bpi = 4'(b);
        #1;
        e = int'(li) + $countones(bits & ((32'd2 << b) - 1));
        checks++;
        if (apta !== 8'(e)) begin
          failures++;
          $display("FAIL bits=%h li=%0d bpi=%0d apta=%0d exp=%0d", bits, li, b, apta, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
