// tb_wash_sequencer: runs a short wash program (3 alternating wash
// half-cycles, 2 spin repeats) and compares the speed reference at every
// tick with an independently generated profile: ramps of RAMP_STEP per
// tick, plateaus of hold+1 ticks, direction reversal in the wash, descent
// to the wash speed between spin repeats and to a stop after the last.
// Also checks the phase flags, the single `done` pulse and `stop`.
module tb_wash_sequencer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int TC = 4, STEP = 10;

  logic               start, stop, motor_en, washing, spinning, done;
  logic [15:0]        wash_rpm, spin_rpm, wash_hold, spin_hold;
  logic [7:0]         wash_cycles, spin_cycles;
  logic signed [15:0] speed_ref;

  wash_sequencer #(.TICK_CYCLES(TC), .RAMP_STEP(STEP)) dut (.*);

  int checks = 0, failures = 0, dones = 0;
  int exp_q [$];
  int ph_q  [$];   // 1 wash, 2 spin

  always @(posedge clk) if (rst_n && done) dones++;

  task automatic gen();
    int v;
    v = 0;
    for (int c = 0; c < int'(wash_cycles); c++) begin
      int sg;
      sg = (c % 2) ? -1 : 1;
      while (v < int'(wash_rpm)) begin v = (v + STEP > int'(wash_rpm)) ? int'(wash_rpm) : v + STEP; exp_q.push_back(sg * v); ph_q.push_back(1); end
      for (int h = 0; h <= int'(wash_hold); h++) begin exp_q.push_back(sg * v); ph_q.push_back(1); end
      while (v > 0) begin v = (v - STEP < 0) ? 0 : v - STEP; exp_q.push_back(sg * v); ph_q.push_back(1); end
    end
    for (int j = 0; j < int'(spin_cycles); j++) begin
      int fl;
      fl = (j == int'(spin_cycles) - 1) ? 0 : int'(wash_rpm);
      while (v < int'(spin_rpm)) begin v = (v + STEP > int'(spin_rpm)) ? int'(spin_rpm) : v + STEP; exp_q.push_back(v); ph_q.push_back(2); end
      for (int h = 0; h <= int'(spin_hold); h++) begin exp_q.push_back(v); ph_q.push_back(2); end
      while (v > fl) begin v = (v - STEP < fl) ? fl : v - STEP; exp_q.push_back(v); ph_q.push_back(2); end
    end
  endtask

  initial begin
    start = 0; stop = 0;
    wash_rpm = 45; spin_rpm = 203; wash_hold = 5; spin_hold = 8; wash_cycles = 3; spin_cycles = 2;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    checks++; if (motor_en || speed_ref != 0) begin failures++; $display("FAIL idle outputs"); end
    gen();
    start = 1; @(negedge clk); start = 0;
    while (exp_q.size() > 0) begin
      int e, p;
      @(posedge clk iff dut.tick);
      @(negedge clk);
      e = exp_q.pop_front(); p = ph_q.pop_front();
      checks++;
      if (int'(speed_ref) != e) begin failures++; $display("FAIL ref %0d exp %0d (left %0d)", speed_ref, e, exp_q.size()); end
      // the state has already moved on to that of the next tick
      if (exp_q.size() > 0) begin
        p = ph_q[0];
        checks++;
        if (washing != (p == 1) || spinning != (p == 2) || !motor_en) begin
          failures++; $display("FAIL flags w=%0b s=%0b p=%0d", washing, spinning, p);
        end
      end
    end
    repeat (2) @(negedge clk);
    checks++;
    if (motor_en || dones != 1 || speed_ref != 0) begin failures++; $display("FAIL end en=%0b dones=%0d", motor_en, dones); end
    // stop in the middle of a program
    start = 1; @(negedge clk); start = 0;
    repeat (40 * TC) @(negedge clk);
    checks++; if (!motor_en || speed_ref == 0) begin failures++; $display("FAIL restart"); end
    stop = 1; @(negedge clk); stop = 0;
    checks++; if (motor_en || speed_ref != 0) begin failures++; $display("FAIL stop"); end
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
