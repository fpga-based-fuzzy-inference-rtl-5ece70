// tb_fis_input_regs: loads random input sets and checks the pointer read,
// the ready flag set by load and cleared by consume, and load priority.
module tb_fis_input_regs;
  import fis_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  load, consume, ready;
  data_t in_data [4];
  io_t   sel;
  data_t sel_value;
  data_t model [4];
  int checks = 0, failures = 0;

  fis_input_regs #(.NUM_INPUTS(4)) dut (.*);

  initial begin
    load = 0; consume = 0; sel = 0;
    for (int i = 0; i < 4; i++) in_data[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (ready) begin failures++; $display("FAIL ready after reset"); end
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 4; i++) begin in_data[i] = 8'($urandom); model[i] = in_data[i]; end
      load = 1; @(negedge clk); load = 0;
      for (int i = 0; i < 4; i++) in_data[i] = 8'($urandom);   // must not be taken
      checks++; if (!ready) begin failures++; $display("FAIL ready not set"); end
      for (int i = 0; i < 4; i++) begin
        sel = io_t'(i); #1;
        checks++;
        if (sel_value != model[i]) begin failures++; $display("FAIL in%0d %0d != %0d", i, sel_value, model[i]); end
      end
      @(negedge clk);
      consume = 1; @(negedge clk); consume = 0;
      checks++; if (ready) begin failures++; $display("FAIL ready not cleared"); end
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
