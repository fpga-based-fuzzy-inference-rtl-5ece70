// tb_washer_step: step-response workload for the washing machine
// controller. With a ramp step larger than the speed target the sequencer
// turns a two half-cycle wash program into speed steps: 0 -> +1000 rpm,
// hold, then a reversing step to -1000 rpm, hold. The same 3x3 fuzzy rule
// base as tb_washer_top and the behavioural motor close the loop.
// Measured and checked: the rise time to 90% of the first step (at most
// 800 ms), the overshoot (at most 15%), the speed at the end of each hold
// (within 10%), and the deceleration time from +1000 rpm down to 100 rpm
// after the reversing step (at most 800 ms). Runs with a 1 MHz clock and
// 1 ms sequencer ticks.
module tb_washer_step;
  import fis_pkg::*;
  localparam int CLK_HZ = 1_000_000;
  localparam int MS = CLK_HZ / 1000;
  localparam int STEP_RPM = 1000;

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
  logic                  pos_pulse;
  logic [2:0]            pwm_h, pwm_l;
  logic signed [15:0]    speed_ref, freq_dhz;
  logic [15:0]           speed_rpm;
  logic                  stalled, motor_en, washing, spinning, prog_done;
  logic                  ctrl_sample, ctrl_overrun, fis_done;
  logic [7:0]            volt_cmd;
  data_t                 fis_aux [3];
  int                    motor_rpm;

  washer_top #(
    .CLK_HZ(CLK_HZ), .TICK_CYCLES(MS), .SPEED_TICK_HZ(CLK_HZ),
    .CARRIER_DIV(1), .RAMP_STEP(20000)
  ) dut (.*);

  pm_motor_model #(.CLK_HZ(CLK_HZ), .UPD_CYCLES(10)) motor (
    .clk, .enable(motor_en), .volt_cmd, .freq_dhz,
    .pos_pulse, .speed_rpm(motor_rpm)
  );

  int checks = 0, failures = 0;

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

  int t_up = -1, t_rise = -1, t_down = -1, t_fall = -1, t_end = -1;
  int peak = 0, end_rpm = 0, end2_rpm = 0, n_ms = 0;
  logic signed [15:0] ref_q = 0;
  always @(posedge clk) if (rst_n && dut.u_seq.tick) begin
    n_ms++;
    if (speed_ref == STEP_RPM && ref_q == 0) t_up = n_ms;
    if (speed_ref != STEP_RPM && ref_q == STEP_RPM) begin t_down = n_ms; end_rpm = motor_rpm; end
    if (speed_ref != -STEP_RPM && ref_q == -STEP_RPM) begin t_end = n_ms; end2_rpm = motor_rpm; end
    if (t_up >= 0 && t_down < 0) begin
      if (motor_rpm > peak) peak = motor_rpm;
      if (t_rise < 0 && motor_rpm >= STEP_RPM * 9 / 10) t_rise = n_ms - t_up;
    end
    if (t_down >= 0 && t_fall < 0 && motor_rpm <= STEP_RPM / 10) t_fall = n_ms - t_down;
    ref_q = speed_ref;
  end

  initial begin
    prog_we = 0; prog_sel = MEM_MF; prog_addr = 0; prog_data = 0; rule_count = 0;
    start = 0; stop = 0;
    wash_rpm = STEP_RPM; spin_rpm = 0; wash_hold = 900; spin_hold = 0;
    wash_cycles = 2; spin_cycles = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    program_fis();
    start = 1; @(negedge clk); start = 0;
    while (!prog_done) @(negedge clk);
    repeat (20 * MS) @(negedge clk);

    $display("step +/-%0d rpm: rise(90%%)=%0d ms peak=%0d rpm hold end=%0d rpm fall(10%%)=%0d ms reverse end=%0d rpm",
             STEP_RPM, t_rise, peak, end_rpm, t_fall, end2_rpm);
    checks += 6;
    if (t_up < 0 || t_down < 0 || t_end < 0) begin failures++; $display("FAIL no step seen"); end
    if (t_rise < 0 || t_rise > 800) begin failures++; $display("FAIL rise time %0d", t_rise); end
    if (peak > STEP_RPM * 115 / 100) begin failures++; $display("FAIL overshoot %0d", peak); end
    if (end_rpm < STEP_RPM * 9 / 10 || end_rpm > STEP_RPM * 11 / 10)
      begin failures++; $display("FAIL hold end speed %0d", end_rpm); end
    if (t_fall < 0 || t_fall > 800) begin failures++; $display("FAIL fall time %0d", t_fall); end
    if (end2_rpm > -STEP_RPM * 9 / 10 || end2_rpm < -STEP_RPM * 11 / 10)
      begin failures++; $display("FAIL reverse end speed %0d", end2_rpm); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
