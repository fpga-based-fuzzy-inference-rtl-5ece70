// pm_motor_model: behavioural stand-in for the inverter, the PM motor and
// its rotor position detector, for closed-loop testbenches only.
// The motor speed follows a first-order lag towards KV_RPM * volt_cmd in the
// direction given by the sign of the inverter frequency command (time
// constant TAU_S); the shaft angle is integrated and a pulse of PULSE_CLK
// clocks is emitted every 1/PULSES_PER_REV of a revolution. The model is
// updated every UPD_CYCLES clocks. Not synthesizable (real arithmetic).
module pm_motor_model #(
  parameter int  CLK_HZ         = 78_000_000,
  parameter int  UPD_CYCLES     = 78,
  parameter int  PULSES_PER_REV = 24,
  parameter real KV_RPM         = 8.0,
  parameter real TAU_S          = 0.05,
  parameter int  PULSE_CLK      = 8
) (
  input  logic               clk,
  input  logic               enable,
  input  logic [7:0]         volt_cmd,
  input  logic signed [15:0] freq_dhz,
  output logic               pos_pulse,
  output int                 speed_rpm    // signed, rounded
);

  real speed = 0.0, pos = 0.0, target, dt;
  int  upd = 0, pcnt = 0;

  initial begin
    pos_pulse = 1'b0;
    speed_rpm = 0;
  end

  always @(posedge clk) begin
    if (pcnt > 0) pcnt <= pcnt - 1;
    pos_pulse <= (pcnt > 0);
    if (upd == UPD_CYCLES - 1) begin
      upd <= 0;
      dt = real'(UPD_CYCLES) / real'(CLK_HZ);
      if (!enable || freq_dhz == 0) target = 0.0;
      else target = KV_RPM * real'(volt_cmd) * (freq_dhz < 0 ? -1.0 : 1.0);
      speed = speed + (target - speed) * dt / TAU_S;
      pos = pos + (speed < 0 ? -speed : speed) / 60.0 * real'(PULSES_PER_REV) * dt;
      if (pos >= 1.0) begin
        pos = pos - 1.0;
        pcnt <= PULSE_CLK;
      end
      speed_rpm <= int'(speed);
    end else begin
      upd <= upd + 1;
    end
  end

endmodule
