// tb_pwm3_modulator: checks the three-phase PWM. With the frequency held at
// zero the high time of each phase over one carrier period must equal twice
// 128 + amplitude*sin(phase)/256 (sine from $sin, phases 0, -120, -240
// degrees); high and low gates must be complementary; `enable` low must turn
// every gate off; and the phase accumulator must advance (or, for a
// negative frequency, retreat) at freq * 2^32 / (10*CLK_HZ) per clock.
module tb_pwm3_modulator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int CLK = 1_000_000;
  localparam real PI = 3.14159265358979;

  logic               enable;
  logic [7:0]         amplitude, carrier;
  logic signed [15:0] freq_dhz;
  logic [2:0]         pwm_h, pwm_l;
  int checks = 0, failures = 0;

  pwm3_modulator #(.CLK_HZ(CLK), .CARRIER_DIV(1)) dut (.*);

  logic enable_d;
  always @(posedge clk) enable_d <= enable;
  // gates are registered: they follow enable one clock later
  always @(negedge clk) if (rst_n) begin
    if ((pwm_h & pwm_l) != 0) begin failures++; $display("FAIL shoot-through"); end
    if (enable_d && (pwm_h ^ pwm_l) != 3'b111) begin failures++; $display("FAIL gates not complementary"); end
    if (!enable_d && (pwm_h | pwm_l) != 0) begin failures++; $display("FAIL gates on while disabled"); end
  end

  task automatic duty_check(input int amp);
    int high [3];
    amplitude = 8'(amp);
    repeat (3 * 510) @(negedge clk);            // let the duty be resampled
    while (carrier != 0) @(negedge clk);
    for (int k = 0; k < 3; k++) high[k] = 0;
    repeat (510) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) if (pwm_h[k]) high[k]++;
    end
    for (int k = 0; k < 3; k++) begin
      real ang; int s8, exp_d;
      ang = 2.0 * PI * real'((256 - (k == 0 ? 0 : (k == 1 ? 85 : 171))) % 256) / 256.0;
      s8 = int'($floor(127.0 * $sin(ang) + 0.5));
      exp_d = 128 + ((amp * s8) >>> 8);
      checks++;
      if (high[k] < 2 * exp_d - 6 || high[k] > 2 * exp_d + 6) begin
        failures++; $display("FAIL phase %0d amp %0d high=%0d exp=%0d", k, amp, high[k], 2 * exp_d);
      end
    end
  endtask

  task automatic freq_check(input int f);
    longint p0, p1, exp_adv, adv, diff;
    int n;
    n = 2000;
    freq_dhz = 16'(f);
    @(negedge clk); p0 = longint'(dut.phase);
    repeat (n) @(negedge clk);
    p1 = longint'(dut.phase);
    adv = (p1 - p0) & 64'hFFFF_FFFF;
    if (f < 0) adv = adv - (64'd1 << 32);
    exp_adv = longint'($floor(real'(f) / 10.0 * real'(n) / real'(CLK) * 4294967296.0));
    checks++;
    diff = adv - exp_adv;
    if (diff < 0) diff = -diff;
    if (diff > (exp_adv < 0 ? -exp_adv : exp_adv) / 500 + 2 * n) begin
      failures++; $display("FAIL freq %0d adv=%0d exp=%0d", f, adv, exp_adv);
    end
  endtask

  initial begin
    enable = 0; amplitude = 0; freq_dhz = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (600) @(negedge clk);
    enable = 1;
    duty_check(0);
    duty_check(255);
    duty_check(128);
    duty_check(40);
    freq_check(1000);    // 100 Hz
    freq_check(-1000);   // reverse
    freq_check(37);
    enable = 0;
    repeat (600) @(negedge clk);
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
