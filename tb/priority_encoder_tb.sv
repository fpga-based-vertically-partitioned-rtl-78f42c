// priority_encoder_tb: self-checking test of the priority encoder.
// Single-bit, zero, all-ones and random vectors; the expected address is
// found by scanning upward from bit 0.
module priority_encoder_tb;
  localparam int unsigned N = 16;
  logic [N-1:0] vec;
  logic         hit;
  logic [3:0]   addr;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  priority_encoder #(.N(N)) dut (.*);

  task automatic check(input logic [N-1:0] v);
    int e;
    vec = v;
    #1;
    e = -1;
    for (int b = 0; b < N && e < 0; b++) if (v[b]) e = b;
    checks++;
    if (hit !== (e >= 0) || (e >= 0 && addr !== 4'(e)) || (e < 0 && addr !== 0)) begin
      failures++;
      $display("FAIL vec=%h hit=%b addr=%0d exp=%0d", v, hit, addr, e);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    for (int b = 0; b < N; b++) check(N'(1) << b);
    for (int t = 0; t < 1000; t++) check(N'($urandom) & N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
