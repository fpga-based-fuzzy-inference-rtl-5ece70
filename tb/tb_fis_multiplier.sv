// tb_fis_multiplier: exhaustive-corner and random 8x8 products, one cycle
// of latency.
module tb_fis_multiplier;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  fis_multiplier #(.A_W(8), .B_W(8)) dut (.*);

  task automatic check(input int x, input int y);
    @(negedge clk); a = 8'(x); b = 8'(y);
    @(negedge clk);
    checks++;
    if (p != 16'(x * y)) begin failures++; $display("FAIL %0d*%0d=%0d", x, y, p); end
  endtask

  initial begin
    a = 0; b = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    check(255, 255); check(0, 200); check(1, 1); check(128, 2);
    for (int t = 0; t < 500; t++) check($urandom % 256, $urandom % 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
