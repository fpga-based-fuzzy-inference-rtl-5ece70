// tb_speed_meter: feeds rotor position pulse trains of known period and
// checks the measured period, the rpm = 60*TICK_HZ/(24*period) conversion,
// one sample request per pulse within 40 clocks of the pulse, and the
// standstill timeout. Runs with a 1 MHz clock and 100 kHz tick.
module tb_speed_meter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int CLK = 1_000_000, TICK = 100_000, TOUT = 3000;

  logic        pos_pulse;
  logic [15:0] speed_rpm, period_ticks;
  logic        sample, stalled;
  int checks = 0, failures = 0;
  int samples = 0, timeouts = 0;

  speed_meter #(.CLK_HZ(CLK), .TICK_HZ(TICK), .PULSES_PER_REV(24), .TIMEOUT_TICKS(TOUT)) dut (.*);

  always @(posedge clk) if (rst_n && sample) samples++;

  task automatic pulses(input int period_clk, input int n);
    int exp_p, s0, lat;
    exp_p = period_clk / (CLK / TICK);
    for (int k = 0; k < n; k++) begin
      s0 = samples;
      @(negedge clk); pos_pulse = 1;
      lat = 0;
      while (samples == s0 && lat < 60) begin @(negedge clk); lat++; if (lat == 3) pos_pulse = 0; end
      checks++;
      if (lat > 40) begin failures++; $display("FAIL no sample after pulse (%0d)", lat); end
      if (k > 0) begin
        checks += 2;
        if (period_ticks < 16'(exp_p - 1) || period_ticks > 16'(exp_p + 1)) begin
          failures++; $display("FAIL period %0d exp %0d", period_ticks, exp_p);
        end
        if (int'(speed_rpm) != (60 * TICK / 24) / int'(period_ticks) || stalled) begin
          failures++; $display("FAIL rpm %0d for period %0d", speed_rpm, period_ticks);
        end
      end
      repeat (period_clk - lat - 1) @(negedge clk);
    end
  endtask

  initial begin
    pos_pulse = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    checks++; if (!stalled) begin failures++; $display("FAIL not stalled at reset"); end
    pulses(1667, 6);    // 1500 rpm at 1 MHz / 100 kHz tick: 166.7 ticks
    pulses(25000, 4);   // 100 rpm
    pulses(500, 6);     // 5000 rpm
    // stop: a timeout sample with speed 0 must come
    begin
      int s0, w;
      s0 = samples; w = 0;
      while (samples == s0 && w < 40000) begin @(negedge clk); w++; end
      checks++;
      if (w >= 40000 || speed_rpm != 0 || !stalled) begin failures++; $display("FAIL timeout w=%0d", w); end
      else timeouts++;
    end
    checks++; if (timeouts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
