// tb_fis_fire_strength: grades random inputs against random membership
// records and compares with a reference triangle/shoulder model; checks the
// tag check, empty records, focused left/right shoulder cases and the 1- and
// 18-cycle latencies.
module tb_fis_fire_strength;
  import fis_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    start, ready, busy;
  data_t   x, mu;
  mf_rec_t mf;
  logic [IO_W+SET_W-1:0] tag;
  int checks = 0, failures = 0;
  int n_div = 0, n_flat = 0, n_zero = 0;

  fis_fire_strength dut (.*);

  // reference: integer triangle, shoulders at 0 and 255
  function automatic int ref_mu(input int xv, input int s, input int e, input bit tag_ok);
    int c;
    if (!tag_ok || s > e || xv < s || xv > e) return 0;
    c = (s + e) / 2;
    if (xv <= c) begin
      if (s == 0 || c == s) return 255;
      return (255 * (xv - s)) / (c - s);
    end else begin
      if (e == 255) return 255;
      return (255 * (e - xv)) / (e - c);
    end
  endfunction

  task automatic run(input int xv, input int s, input int e, input bit tag_ok);
    int cyc, exp_v;
    @(negedge clk);
    x = 8'(xv); mf.start_v = 8'(s); mf.end_v = 8'(e);
    mf.port = 2'($urandom); mf.set = 3'($urandom);
    tag = tag_ok ? {mf.port, mf.set} : {mf.port, mf.set} ^ 5'(1 + $urandom % 31);
    start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!ready) begin @(negedge clk); cyc++; end
    exp_v = ref_mu(xv, s, e, tag_ok);
    checks++;
    if (int'(mu) != exp_v) begin
      failures++; $display("FAIL x=%0d [%0d,%0d] tag=%0b mu=%0d exp=%0d", xv, s, e, tag_ok, mu, exp_v);
    end
    checks++;
    if (cyc == 1) begin
      if (exp_v != 0 && exp_v != 255) begin failures++; $display("FAIL fast path for %0d", exp_v); end
      if (exp_v == 0) n_zero++; else n_flat++;
    end else if (cyc == 18) begin
      n_div++;
    end else begin
      failures++; $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    start = 0; x = 0; mf = '0; tag = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(50, 0, 100, 1);      // left shoulder
    run(200, 150, 255, 1);   // right shoulder
    run(100, 50, 150, 1);    // peak
    run(75, 50, 150, 1);     // half way up
    run(125, 50, 150, 1);    // half way down
    run(100, 50, 150, 0);    // wrong tag
    run(10, 50, 150, 1);     // outside
    for (int t = 0; t < 20; t++) run(128 + $urandom % 128, 100 + $urandom % 100, 255, 1);  // right shoulders
    for (int t = 0; t < 20; t++) run($urandom % 128, 0, 20 + $urandom % 200, 1);          // left shoulders
    run(60, 100, 50, 1);     // start > end: empty
    for (int t = 0; t < 2000; t++) begin
      int s, e;
      s = $urandom % 256; e = $urandom % 256;
      if (s > e && ($urandom % 8) != 0) begin int tmp = s; s = e; e = tmp; end
      run($urandom % 256, s, e, ($urandom % 10) != 0);
    end
    checks++;
    if (n_div == 0 || n_flat == 0 || n_zero == 0) begin
      failures++; $display("FAIL coverage div=%0d flat=%0d zero=%0d", n_div, n_flat, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
