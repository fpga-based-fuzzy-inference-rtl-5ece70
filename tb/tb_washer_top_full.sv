// tb_washer_top_full: the washing machine controller with every parameter
// at its default (78 MHz clock, 1 ms ticks, 1 us speed ticks, 1 rpm/ms
// ramps), closed through the behavioural motor model. It programs the FIS
// and runs one complete short program: two alternating wash half-cycles at
// 100 rpm with 200 ms plateaus, then one spin to 300 rpm, and checks
// tracking, inferences, pulse and timeout samples, reversal, PWM switching
// and the program end.
module tb_washer_top_full;
  import fis_pkg::*;
  localparam int CLK_HZ = 78_000_000;
  localparam int MS = CLK_HZ / 1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  prog_we;
  mem_sel_e              prog_sel;
  logic [RULE_W-1:0]     prog_addr;
  logic [RULE_REC_W-1:0] prog_data;
  logic [RULE_W:0]       rule_count;
  logic                  start, stop;
  logic [15:0]           wash_rpm, spin_rpm, wash_hold, spin_hold;
  logic [7:0]            wash_cycles, spin_cycles;
  logic                  pos_pulse, motor_pulse, inject, inj_pulse;
  logic [2:0]            pwm_h, pwm_l;
  logic signed [15:0]    speed_ref, freq_dhz;
  logic [15:0]           speed_rpm;
  logic                  stalled, motor_en, washing, spinning, prog_done;
  logic                  ctrl_sample, ctrl_overrun, fis_done;
  logic [7:0]            volt_cmd;
  data_t                 fis_aux [3];
  int                    motor_rpm;

  washer_top dut (.*);

  pm_motor_model #(.CLK_HZ(CLK_HZ), .UPD_CYCLES(78)) motor (
    .clk, .enable(motor_en), .volt_cmd, .freq_dhz,
    .pos_pulse(motor_pulse), .speed_rpm(motor_rpm)
  );
  assign pos_pulse = inject ? inj_pulse : motor_pulse;

  int checks = 0, failures = 0;
  int n_infer = 0, n_pulse_samples = 0, n_timeouts = 0, n_reverse = 0, n_wash = 0, n_spin = 0;
  int n_pwm = 0, n_done = 0, n_overrun = 0, n_aux = 0, n_track = 0;

  always @(posedge clk) if (rst_n) begin
    if (fis_done) begin
      n_infer++;
      if (fis_aux[0] != 0 && fis_aux[0] != 128) begin failures++; $display("FAIL aux %0d", fis_aux[0]); end
      if (fis_aux[0] == 128) n_aux++;
    end
    if (ctrl_sample && !stalled) n_pulse_samples++;
    if (ctrl_sample && stalled) n_timeouts++;
    if (washing && freq_dhz < 0 && motor_rpm < -20) n_reverse++;
    if (washing) n_wash++;
    if (spinning) n_spin++;
    if (pwm_h[0] && !pwm_h[1]) n_pwm++;
    if (prog_done) n_done++;
    if (ctrl_overrun) n_overrun++;
    if (!motor_en && (pwm_h | pwm_l) != 0 && !$past(motor_en)) begin
      failures++; $display("FAIL gates on while idle");
    end
  end

  // tracking: once the reference has been steady for 180 ms, the motor
  // must be within 10% (at least 15 rpm) of it
  int steady = 0;
  logic signed [15:0] last_ref = 0;
  always @(posedge clk) if (rst_n && dut.u_seq.tick) begin
    if (speed_ref == last_ref && speed_ref != 0) steady++;
    else steady = 0;
    last_ref = speed_ref;
    if (steady == 180 && !inject) begin
      int err, tol;
      err = motor_rpm - int'(speed_ref);
      if (err < 0) err = -err;
      tol = (speed_ref < 0 ? -int'(speed_ref) : int'(speed_ref)) / 10;
      if (tol < 15) tol = 15;
      checks++; n_track++;
      if (err > tol) begin failures++; $display("FAIL tracking ref=%0d motor=%0d", speed_ref, motor_rpm); end
      else $display("track ref=%0d motor=%0d volt=%0d", speed_ref, motor_rpm, volt_cmd);
    end
  end

  task automatic prog(input mem_sel_e s, input int a, input logic [21:0] d);
    @(negedge clk); prog_we = 1; prog_sel = s; prog_addr = 6'(a); prog_data = d;
    @(negedge clk); prog_we = 0;
  endtask

  task automatic program_fis();
    mf_rec_t m;
    rule_rec_t r;
    // inputs 0 (error) and 1 (change of error): N, Z, P
    for (int i = 0; i < 2; i++) begin
      m.port = 2'(i);
      m.set = 0; m.start_v = 0;   m.end_v = 128; prog(MEM_MF, i*8+0, 22'(m));
      m.set = 1; m.start_v = 112; m.end_v = 144; prog(MEM_MF, i*8+1, 22'(m));
      m.set = 2; m.start_v = 128; m.end_v = 255; prog(MEM_MF, i*8+2, 22'(m));
    end
    // output 0 weights: voltage change -128, -40, 0, +40, +127 (around 128)
    prog(MEM_WEIGHT, 0, 22'd0);  prog(MEM_WEIGHT, 1, 22'd88); prog(MEM_WEIGHT, 2, 22'd128);
    prog(MEM_WEIGHT, 3, 22'd168); prog(MEM_WEIGHT, 4, 22'd255);
    prog(MEM_WEIGHT, 8 + 2, 22'd128);    // output 1, set 2
    for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) begin
      r = '0; r.rule_no = 6'(a*3+b); r.in1 = 0; r.set1 = 3'(a); r.op = OP_AND;
      r.in2 = 1; r.set2 = 3'(b); r.out = 0; r.oset = 3'(a + b);
      prog(MEM_RULE, a*3+b, 22'(r));
    end
    r = '0; r.rule_no = 6'd9; r.in1 = 0; r.set1 = 1; r.op = OP_OR; r.in2 = 1; r.set2 = 1;
    r.out = 1; r.oset = 2;
    prog(MEM_RULE, 9, 22'(r));
    rule_count = 7'd10;
  endtask

  initial begin
    prog_we = 0; prog_sel = MEM_MF; prog_addr = 0; prog_data = 0; rule_count = 0;
    start = 0; stop = 0; inject = 0; inj_pulse = 0;
    wash_rpm = 100; spin_rpm = 300; wash_hold = 200; spin_hold = 200;
    wash_cycles = 2; spin_cycles = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    program_fis();
    start = 1; @(negedge clk); start = 0;
    while (!(n_done > 0)) @(negedge clk);
    repeat (5 * MS) @(negedge clk);
    stop = 1; @(negedge clk); stop = 0;
    repeat (10) @(negedge clk);
    checks++; if (motor_en) begin failures++; $display("FAIL stop"); end

    $display("infer=%0d pulse_samples=%0d timeouts=%0d reverse=%0d wash=%0d spin=%0d pwm=%0d done=%0d overrun=%0d aux=%0d track=%0d",
             n_infer, n_pulse_samples, n_timeouts, n_reverse, n_wash, n_spin, n_pwm, n_done, n_overrun, n_aux, n_track);
    checks += 10;
    if (n_infer == 0)         begin failures++; $display("FAIL no inference"); end
    if (n_pulse_samples == 0) begin failures++; $display("FAIL no pulse sample"); end
    if (n_timeouts == 0)      begin failures++; $display("FAIL no standstill timeout"); end
    if (n_reverse == 0)       begin failures++; $display("FAIL no reversal"); end
    if (n_wash == 0)          begin failures++; $display("FAIL no wash phase"); end
    if (n_spin == 0)          begin failures++; $display("FAIL no spin phase"); end
    if (n_pwm == 0)           begin failures++; $display("FAIL no PWM"); end
    if (n_done != 1)          begin failures++; $display("FAIL program end %0d", n_done); end
    if (n_aux == 0)           begin failures++; $display("FAIL aux output never fired"); end
    if (n_track < 3)          begin failures++; $display("FAIL only %0d tracking checks", n_track); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (160_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
