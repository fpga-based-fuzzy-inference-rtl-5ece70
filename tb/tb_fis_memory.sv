// tb_fis_memory: programs all three tables with random words and reads them
// back through the three read ports, checking the one-cycle read latency
// and the record field layout.
module tb_fis_memory;
  import fis_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                  prog_we;
  mem_sel_e              prog_sel;
  logic [RULE_W-1:0]     prog_addr;
  logic [RULE_REC_W-1:0] prog_data;
  logic [IO_W+SET_W-1:0] mf_addr, w_addr;
  mf_rec_t               mf_data;
  logic [RULE_W-1:0]     rule_addr;
  rule_rec_t             rule_data;
  data_t                 w_data;

  logic [MF_W-1:0]       mf_m   [32];
  logic [RULE_REC_W-1:0] rule_m [64];
  data_t                 w_m    [32];
  int checks = 0, failures = 0;

  fis_memory dut (.*);

  task automatic wr(input mem_sel_e s, input int a, input logic [21:0] d);
    @(negedge clk); prog_we = 1; prog_sel = s; prog_addr = 6'(a); prog_data = d;
    @(negedge clk); prog_we = 0;
  endtask

  initial begin
    prog_we = 0; prog_sel = MEM_MF; prog_addr = 0; prog_data = 0;
    mf_addr = 0; w_addr = 0; rule_addr = 0;
    for (int a = 0; a < 32; a++) begin mf_m[a] = 21'($urandom); wr(MEM_MF, a, 22'(mf_m[a])); end
    for (int a = 0; a < 64; a++) begin rule_m[a] = 22'($urandom); wr(MEM_RULE, a, rule_m[a]); end
    for (int a = 0; a < 32; a++) begin w_m[a] = 8'($urandom); wr(MEM_WEIGHT, a, 22'(w_m[a]) | 22'h3FFF00); end
    for (int t = 0; t < 200; t++) begin
      int ma, ra, wa;
      ma = $urandom % 32; ra = $urandom % 64; wa = $urandom % 32;
      @(negedge clk); mf_addr = 5'(ma); rule_addr = 6'(ra); w_addr = 5'(wa);
      @(negedge clk);
      checks += 3;
      if (mf_data != mf_rec_t'(mf_m[ma]))     begin failures++; $display("FAIL mf %0d", ma); end
      if (rule_data != rule_rec_t'(rule_m[ra])) begin failures++; $display("FAIL rule %0d", ra); end
      if (w_data != w_m[wa])                  begin failures++; $display("FAIL w %0d", wa); end
    end
    // field layout: port/set/start/end
    @(negedge clk); mf_addr = 5'd0; @(negedge clk);
    checks++;
    if (mf_data.end_v != mf_m[0][7:0] || mf_data.start_v != mf_m[0][15:8] ||
        mf_data.port != mf_m[0][20:19]) begin failures++; $display("FAIL layout"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
