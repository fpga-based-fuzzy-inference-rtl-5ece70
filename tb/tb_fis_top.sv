// tb_fis_top: end-to-end test of the fuzzy inference system at its full
// size (4 inputs, 4 outputs, 8 sets, up to 64 rules). Random membership
// tables, weights and rule bases are programmed; random input sets are
// evaluated and every output is compared with a reference Mamdani min/max,
// centre-of-gravity computation done in the testbench. Also exercised: a
// start before the inputs are loaded (the evaluator must wait), an output
// with no firing rule, and a 2-input 1-output 3x3 controller-style table.
// Finally the worst-case inference time (64 rules for one output, every
// grade needing a division) is measured and must be at most 3,600 cycles.
module tb_fis_top;
  import fis_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  prog_we;
  mem_sel_e              prog_sel;
  logic [RULE_W-1:0]     prog_addr;
  logic [RULE_REC_W-1:0] prog_data;
  logic [RULE_W:0]       rule_count;
  logic                  in_load, inputs_ready, start, busy, done;
  data_t                 in_data [4];
  data_t                 out_data [4];
  logic [3:0]            out_nofire;

  fis_top dut (.*);

  int checks = 0, failures = 0, n_cycles = 0;
  always @(posedge clk) n_cycles++;
  int mf_s [32], mf_e [32], wt [32];
  rule_rec_t rules [64];
  int n_wait = 0, n_nofire = 0, n_fired = 0, n_or = 0, n_and = 0;

  function automatic int ref_mu(input int xv, input int s, input int e);
    int c;
    if (s > e || xv < s || xv > e) return 0;
    c = (s + e) / 2;
    if (xv <= c) begin
      if (s == 0 || c == s) return 255;
      return (255 * (xv - s)) / (c - s);
    end else begin
      if (e == 255) return 255;
      return (255 * (e - xv)) / (e - c);
    end
  endfunction

  task automatic prog(input mem_sel_e s, input int a, input logic [21:0] d);
    @(negedge clk); prog_we = 1; prog_sel = s; prog_addr = 6'(a); prog_data = d;
    @(negedge clk); prog_we = 0;
  endtask

  task automatic load_tables(input int cnt);
    for (int a = 0; a < 32; a++) begin
      mf_rec_t m;
      m.port = 2'(a >> 3); m.set = 3'(a); m.start_v = 8'(mf_s[a]); m.end_v = 8'(mf_e[a]);
      prog(MEM_MF, a, 22'(m));
      prog(MEM_WEIGHT, a, 22'(wt[a]));
    end
    for (int r = 0; r < cnt; r++) prog(MEM_RULE, r, 22'(rules[r]));
    rule_count = 7'(cnt);
  endtask

  task automatic infer(input int xin [4], input int cnt, input bit start_first);
    int num [4], den [4], mu1, mu2, st, exp_v, cyc;
    for (int o = 0; o < 4; o++) begin num[o] = 0; den[o] = 0; end
    for (int r = 0; r < cnt; r++) begin
      int a1, a2;
      a1 = int'({rules[r].in1, rules[r].set1}); a2 = int'({rules[r].in2, rules[r].set2});
      mu1 = ref_mu(xin[rules[r].in1], mf_s[a1], mf_e[a1]);
      mu2 = ref_mu(xin[rules[r].in2], mf_s[a2], mf_e[a2]);
      if (rules[r].op == OP_OR) begin st = (mu1 > mu2) ? mu1 : mu2; n_or++; end
      else begin st = (mu1 < mu2) ? mu1 : mu2; n_and++; end
      den[rules[r].out] += st;
      num[rules[r].out] += st * wt[{rules[r].out, rules[r].oset}];
    end
    @(negedge clk);
    for (int i = 0; i < 4; i++) in_data[i] = 8'(xin[i]);
    if (start_first) begin
      start = 1; @(negedge clk); start = 0;
      repeat (5) @(negedge clk);
      checks++; if (!busy || inputs_ready) begin failures++; $display("FAIL not waiting"); end
      n_wait++;
      in_load = 1; @(negedge clk); in_load = 0;
    end else begin
      in_load = 1; @(negedge clk); in_load = 0;
      start = 1; @(negedge clk); start = 0;
    end
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    for (int o = 0; o < 4; o++) begin
      exp_v = (den[o] == 0) ? 0 : num[o] / den[o];
      checks++;
      if (int'(out_data[o]) != exp_v || out_nofire[o] != (den[o] == 0)) begin
        failures++;
        $display("FAIL out%0d=%0d nf=%0b exp %0d (num %0d den %0d)", o, out_data[o], out_nofire[o], exp_v, num[o], den[o]);
      end
      if (den[o] == 0) n_nofire++; else n_fired++;
    end
    // latency bound: per rule at most 2+2*19+5 cycles, per output 2 + 35
    checks++;
    if (cyc > 4 * (cnt * 45 + 40)) begin failures++; $display("FAIL slow %0d cycles", cyc); end
  endtask

  initial begin
    int x [4];
    prog_we = 0; prog_sel = MEM_MF; prog_addr = 0; prog_data = 0; rule_count = 0;
    in_load = 0; start = 0;
    for (int i = 0; i < 4; i++) in_data[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // 1) controller-style table: 3 sets on in0 and in1, 9 rules to output 0
    for (int a = 0; a < 32; a++) begin mf_s[a] = 1; mf_e[a] = 0; wt[a] = 0; end
    for (int i = 0; i < 2; i++) begin
      mf_s[i*8+0] = 0;   mf_e[i*8+0] = 128;   // negative (left shoulder)
      mf_s[i*8+1] = 64;  mf_e[i*8+1] = 192;   // zero
      mf_s[i*8+2] = 128; mf_e[i*8+2] = 255;   // positive (right shoulder)
    end
    wt[0] = 0; wt[1] = 64; wt[2] = 128; wt[3] = 192; wt[4] = 255;
    for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) begin
      rule_rec_t rr;
      rr = '0; rr.rule_no = 6'(a*3+b); rr.in1 = 0; rr.set1 = 3'(a); rr.op = OP_AND;
      rr.in2 = 1; rr.set2 = 3'(b); rr.out = 0; rr.oset = 3'(a + b);
      rules[a*3+b] = rr;
    end
    load_tables(9);
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < 4; i++) x[i] = $urandom % 256;
      infer(x, 9, t == 3);
    end

    // 2) random full-size tables and rule bases
    for (int k = 0; k < 6; k++) begin
      int cnt;
      for (int a = 0; a < 32; a++) begin
        int s, e;
        s = $urandom % 256; e = $urandom % 256;
        if (s > e) begin int tmp = s; s = e; e = tmp; end
        mf_s[a] = s; mf_e[a] = e; wt[a] = $urandom % 256;
      end
      for (int r = 0; r < 64; r++) rules[r] = rule_rec_t'(22'($urandom));
      cnt = (k == 0) ? 64 : 1 + $urandom % 64;
      load_tables(cnt);
      for (int t = 0; t < 10; t++) begin
        for (int i = 0; i < 4; i++) x[i] = $urandom % 256;
        infer(x, cnt, t == 5);
      end
    end
    // 3) worst case for the control step: 64 rules, all for output 0, every
    //    grade on a triangle flank (18-cycle division); must finish well
    //    inside the 1.667 ms pulse interval at 1500 rpm (130,000 cycles at
    //    78 MHz); this design's own bound is 3,600 cycles
    begin
      int t0, cyc;
      for (int a = 0; a < 32; a++) begin mf_s[a] = 10; mf_e[a] = 250; wt[a] = a * 8; end
      for (int r = 0; r < 64; r++) begin
        rules[r] = rule_rec_t'(22'($urandom));
        rules[r].out = 0;
      end
      load_tables(64);
      for (int i = 0; i < 4; i++) x[i] = 60 + i * 40;
      t0 = n_cycles;
      infer(x, 64, 0);
      cyc = n_cycles - t0;
      $display("worst-case inference: %0d cycles", cyc);
      checks++;
      if (cyc > 3600) begin failures++; $display("FAIL worst case %0d cycles", cyc); end
    end
    checks++;
    if (n_wait == 0 || n_nofire == 0 || n_fired == 0 || n_or == 0 || n_and == 0) begin
      failures++; $display("FAIL coverage wait=%0d nofire=%0d fired=%0d", n_wait, n_nofire, n_fired);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
