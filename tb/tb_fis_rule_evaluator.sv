// tb_fis_rule_evaluator: drives the rule evaluator alone, with the memory,
// fire strength calculator, min/max evaluator and divider replaced by
// simple responders with random delays. It checks the order of membership
// requests (input pointer and {input,set} address) for every rule of every
// output, the AND/OR command, the weight address at accumulation, the
// per-output write and clear, the wait for the input registers and `done`.
module tb_fis_rule_evaluator;
  import fis_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NOUT = 4;

  logic              start, busy, done, inputs_ready, consume;
  logic [RULE_W:0]   rule_count;
  io_t               in_sel;
  logic [RULE_W-1:0] rule_addr;
  rule_rec_t         rule_data;
  logic [IO_W+SET_W-1:0] mf_addr, w_addr;
  logic              fs_start, fs_ready;
  mm_cmd_e           mm_cmd;
  logic              mm_valid;
  logic              acc_clr, sum_add, dsum_add, div_start, div_done, out_we;
  io_t               out_idx;

  fis_rule_evaluator #(.NUM_OUTPUTS(NOUT)) dut (.*);

  rule_rec_t rules [64];
  int checks = 0, failures = 0;

  // responders
  always_ff @(posedge clk) rule_data <= rules[rule_addr];

  int fs_delay = -1, div_delay = -1;
  always_ff @(posedge clk) begin
    fs_ready <= 1'b0; div_done <= 1'b0;
    mm_valid <= (mm_cmd == MM_MIN || mm_cmd == MM_MAX);
    if (fs_start) fs_delay <= 1 + $urandom % 20;
    else if (fs_delay > 0) fs_delay <= fs_delay - 1;
    else if (fs_delay == 0) begin fs_ready <= 1'b1; fs_delay <= -1; end
    if (div_start) div_delay <= 34;
    else if (div_delay > 0) div_delay <= div_delay - 1;
    else if (div_delay == 0) begin div_done <= 1'b1; div_delay <= -1; end
  end

  // expected event stream
  typedef struct { int kind; int a; int b; } ev_t;   // 0 fs(addr,sel) 1 op 2 acc(waddr) 3 out(idx,count)
  ev_t exp_q [$];
  int  adds, outs, dones, consumes;

  task automatic build(input int cnt);
    exp_q.delete();
    for (int o = 0; o < NOUT; o++) begin
      int n = 0;
      for (int r = 0; r < cnt; r++) if (int'(rules[r].out) == o) begin
        exp_q.push_back('{0, int'({rules[r].in1, rules[r].set1}), int'(rules[r].in1)});
        exp_q.push_back('{0, int'({rules[r].in2, rules[r].set2}), int'(rules[r].in2)});
        exp_q.push_back('{1, int'(rules[r].op), 0});
        exp_q.push_back('{2, int'({rules[r].out, rules[r].oset}), 0});
        n++;
      end
      exp_q.push_back('{3, o, n});
    end
  endtask

  task automatic expect_ev(input int kind, input int a, input int b);
    ev_t e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected event %0d", kind); return; end
    e = exp_q.pop_front();
    if (e.kind != kind || e.a != a || e.b != b) begin
      failures++; $display("FAIL event got (%0d,%0d,%0d) exp (%0d,%0d,%0d)", kind, a, b, e.kind, e.a, e.b);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (fs_start) expect_ev(0, int'(mf_addr), int'(in_sel));
    if (mm_cmd == MM_MIN) expect_ev(1, 0, 0);
    if (mm_cmd == MM_MAX) expect_ev(1, 1, 0);
    if (sum_add) begin expect_ev(2, int'(w_addr), 0); adds++; end
    if (out_we) begin
      expect_ev(3, int'(out_idx), adds); outs++;
      checks++; if (!acc_clr) begin failures++; $display("FAIL no clear after output"); end
    end
    if (acc_clr) adds = 0;
    if (done) dones++;
    if (consume) consumes++;
    if (consume && !inputs_ready) begin failures++; $display("FAIL consume without ready"); end
  end

  // dsum_add must follow sum_add by one cycle
  logic sum_add_d;
  always @(posedge clk) begin
    if (rst_n && dsum_add != sum_add_d) begin failures++; $display("FAIL dsum timing"); end
    sum_add_d <= sum_add;
  end

  task automatic infer(input int cnt, input bit late_inputs);
    int c0;
    build(cnt);
    c0 = consumes;
    outs = 0; dones = 0;
    rule_count = 7'(cnt);
    @(negedge clk);
    inputs_ready = !late_inputs;
    start = 1; @(negedge clk); start = 0;
    if (late_inputs) begin
      repeat (10) @(negedge clk);
      checks++; if (!busy) begin failures++; $display("FAIL not waiting"); end
      checks++; if (consumes != c0) begin failures++; $display("FAIL consumed early"); end
      inputs_ready = 1;
    end
    while (consumes == c0) @(negedge clk);
    inputs_ready = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (outs != NOUT || dones != 1 || exp_q.size() != 0 || busy) begin
      failures++; $display("FAIL end outs=%0d dones=%0d left=%0d", outs, dones, exp_q.size());
    end
  endtask

  initial begin
    start = 0; inputs_ready = 0; rule_count = 0;
    for (int r = 0; r < 64; r++) rules[r] = rule_rec_t'(22'($urandom));
    repeat (3) @(negedge clk); rst_n = 1;
    infer(9, 0);
    infer(0, 1);
    infer(64, 1);
    for (int t = 0; t < 5; t++) begin
      for (int r = 0; r < 64; r++) rules[r] = rule_rec_t'(22'($urandom));
      infer(1 + $urandom % 64, t % 2);
    end
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
