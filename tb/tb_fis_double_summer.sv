// tb_fis_double_summer: accumulates 64 random 16-bit products (the largest rule base)
// with random gaps and clears, comparing with a running model.
module tb_fis_double_summer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        clr, add;
  logic [15:0] din;
  logic [31:0] sum;
  int model, checks = 0, failures = 0;

  fis_double_summer dut (.*);

  initial begin
    clr = 0; add = 0; din = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 10; run++) begin
      @(negedge clk); clr = 1; add = 1; din = 16'd99; model = 0;
      @(negedge clk); clr = 0; add = 0;
      checks++; if (sum != 0) begin failures++; $display("FAIL clr"); end
      for (int i = 0; i < 64; i++) begin
        add = 1'($urandom); din = (run == 0) ? 16'd65025 : 16'($urandom);
        if (add) model += din;
        @(negedge clk);
        checks++;
        if (sum != 32'(model)) begin failures++; $display("FAIL sum %0d != %0d", sum, model); end
      end
      add = 0;
    end
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
