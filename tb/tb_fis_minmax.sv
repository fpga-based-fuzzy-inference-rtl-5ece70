// tb_fis_minmax: pushes random pairs onto the two-register stack and checks
// MIN and MAX results and the valid pulse timing.
module tb_fis_minmax;
  import fis_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mm_cmd_e cmd;
  data_t   din, result;
  logic    valid;
  int checks = 0, failures = 0;

  fis_minmax dut (.*);

  initial begin
    cmd = MM_NONE; din = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      data_t a, b, c, exp_v;
      logic use_max;
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom); use_max = 1'($urandom);
      // three pushes: only the last two count
      @(negedge clk); cmd = MM_PUSH; din = a;
      @(negedge clk); cmd = MM_PUSH; din = b;
      @(negedge clk); cmd = MM_PUSH; din = c;
      @(negedge clk); cmd = use_max ? MM_MAX : MM_MIN; din = 8'($urandom);
      checks++; if (valid) begin failures++; $display("FAIL early valid"); end
      @(negedge clk); cmd = MM_NONE;
      exp_v = use_max ? ((b > c) ? b : c) : ((b < c) ? b : c);
      checks++;
      if (!valid || result != exp_v) begin
        failures++; $display("FAIL %s(%0d,%0d) got %0d v=%0b", use_max ? "max" : "min", b, c, result, valid);
      end
      @(negedge clk);
      checks++; if (valid) begin failures++; $display("FAIL valid held"); end
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
