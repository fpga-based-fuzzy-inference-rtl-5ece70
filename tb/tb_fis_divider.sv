// tb_fis_divider: self-checking test of the sequential divider.
// Random and corner-case divisions at 32/16 bits are compared with the
// `/` and `%` operators; the done latency (NUM_W+1 cycles) is checked too.
module tb_fis_divider;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start;
  logic [31:0] num, quot;
  logic [15:0] den, rem;
  logic        busy, done, div_zero;
  int checks = 0, failures = 0;

  fis_divider #(.NUM_W(32), .DEN_W(16)) dut (.*);

  task automatic check(input logic [31:0] n, input logic [15:0] d);
    int cyc;
    @(negedge clk); num = n; den = d; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (d == 0) begin
      if (!div_zero || quot != '1) begin failures++; $display("FAIL div0 %0d", n); end
    end else if (quot != n / d || rem != n % d || div_zero) begin
      failures++; $display("FAIL %0d/%0d got q=%0d r=%0d", n, d, quot, rem);
    end
    checks++;
    if (cyc != 33) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    start = 0; num = 0; den = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    check(100, 7); check(65025*64, 16320); check(0, 5); check(5, 0);
    check(32'hFFFF_FFFF, 16'hFFFF); check(32'hFFFF_FFFF, 1); check(12345, 12346);
    for (int i = 0; i < 200; i++) check($urandom, 16'($urandom) | 16'(i % 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
