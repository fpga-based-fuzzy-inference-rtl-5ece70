// washer_top: FPGA washing machine controller with an embedded fuzzy
// inference system driving a sensorless-style PM motor drive.
//
//   wash_sequencer --speed_ref--> fuzzy_speed_ctrl <--speed-- speed_meter <-- pos_pulse
//                                    |   ^                                  (24 / rev)
//                         inputs,start|   |outputs
//                                    v   |
//                                   fis_top (rule base programmed via prog_*)
//                                    |
//                  volt_cmd, freq_dhz v
//                                 pwm3_modulator --> pwm_h / pwm_l (to the inverter)
//
// The sequencer reads the user's program and makes the wash/spin speed
// profile; each rotor position pulse gives a speed sample, which starts one
// FIS inference; the FIS output adjusts the inverter voltage; the frequency
// follows the speed profile. This partition follows the paper's drive
// system (position detector, speed measurement, FIS, PWM inverter) and its
// washing machine tasks; the interfaces between the blocks are this design's.
// The FIS is built at its full size (4 inputs, 4 outputs); the controller
// uses inputs 0-1 and output 0, outputs 1-3 are brought out as `fis_aux`.
module washer_top
  import fis_pkg::*;
#(
  parameter int unsigned CLK_HZ         = 78_000_000,
  parameter int unsigned TICK_CYCLES    = CLK_HZ / 1000,
  parameter int unsigned SPEED_TICK_HZ  = 1_000_000,
  parameter int unsigned PULSES_PER_REV = 24,
  parameter int unsigned POLE_PAIRS     = 4,
  parameter int unsigned CARRIER_DIV    = 8,
  parameter int unsigned RAMP_STEP      = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // FIS table programming
  input  logic                  prog_we,
  input  mem_sel_e              prog_sel,
  input  logic [RULE_W-1:0]     prog_addr,
  input  logic [RULE_REC_W-1:0] prog_data,
  input  logic [RULE_W:0]       rule_count,
  // user commands
  input  logic                  start,
  input  logic                  stop,
  input  logic [15:0]           wash_rpm,
  input  logic [15:0]           spin_rpm,
  input  logic [15:0]           wash_hold,
  input  logic [15:0]           spin_hold,
  input  logic [7:0]            wash_cycles,
  input  logic [7:0]            spin_cycles,
  // rotor position detector
  input  logic                  pos_pulse,
  // inverter gates
  output logic [2:0]            pwm_h,
  output logic [2:0]            pwm_l,
  // monitoring
  output logic signed [15:0]    speed_ref,
  output logic [15:0]           speed_rpm,
  output logic                  stalled,
  output logic [7:0]            volt_cmd,
  output logic signed [15:0]    freq_dhz,
  output logic                  motor_en,
  output logic                  washing,
  output logic                  spinning,
  output logic                  prog_done,
  output logic                  ctrl_sample,
  output logic                  ctrl_overrun,
  output logic                  fis_done,
  output data_t                 fis_aux [3]
);

  localparam int unsigned NIN  = 4;
  localparam int unsigned NOUT = 4;

  logic [15:0] period_ticks;
  logic        fis_load, fis_start, fis_busy, fis_ready;
  data_t       fis_in  [NIN];
  data_t       fis_out [NOUT];
  logic [NOUT-1:0] fis_nofire;
  logic        ctrl_busy;
  logic [7:0]  carrier;

  wash_sequencer #(.TICK_CYCLES(TICK_CYCLES), .RAMP_STEP(RAMP_STEP)) u_seq (
    .clk, .rst_n,
    .start, .stop, .wash_rpm, .spin_rpm, .wash_hold, .spin_hold,
    .wash_cycles, .spin_cycles,
    .speed_ref (speed_ref),
    .motor_en  (motor_en),
    .washing   (washing),
    .spinning  (spinning),
    .done      (prog_done)
  );

  speed_meter #(
    .CLK_HZ(CLK_HZ), .TICK_HZ(SPEED_TICK_HZ), .PULSES_PER_REV(PULSES_PER_REV)
  ) u_speed (
    .clk, .rst_n,
    .pos_pulse    (pos_pulse),
    .speed_rpm    (speed_rpm),
    .period_ticks (period_ticks),
    .sample       (ctrl_sample),
    .stalled      (stalled)
  );

  fuzzy_speed_ctrl #(.NUM_INPUTS(NIN), .POLE_PAIRS(POLE_PAIRS)) u_ctrl (
    .clk, .rst_n,
    .enable     (motor_en),
    .speed_ref  (speed_ref),
    .speed_rpm  (speed_rpm),
    .sample     (ctrl_sample),
    .fis_load   (fis_load),
    .fis_in     (fis_in),
    .fis_start  (fis_start),
    .fis_done   (fis_done),
    .fis_out    (fis_out[0]),
    .fis_nofire (fis_nofire[0]),
    .volt_cmd   (volt_cmd),
    .freq_dhz   (freq_dhz),
    .busy       (ctrl_busy),
    .overrun    (ctrl_overrun)
  );

  fis_top #(.NUM_INPUTS(NIN), .NUM_OUTPUTS(NOUT)) u_fis (
    .clk, .rst_n,
    .prog_we, .prog_sel, .prog_addr, .prog_data, .rule_count,
    .in_load      (fis_load),
    .in_data      (fis_in),
    .inputs_ready (fis_ready),
    .start        (fis_start),
    .busy         (fis_busy),
    .done         (fis_done),
    .out_data     (fis_out),
    .out_nofire   (fis_nofire)
  );

  assign fis_aux[0] = fis_out[1];
  assign fis_aux[1] = fis_out[2];
  assign fis_aux[2] = fis_out[3];

  pwm3_modulator #(.CLK_HZ(CLK_HZ), .CARRIER_DIV(CARRIER_DIV)) u_pwm (
    .clk, .rst_n,
    .enable    (motor_en),
    .amplitude (volt_cmd),
    .freq_dhz  (freq_dhz),
    .pwm_h     (pwm_h),
    .pwm_l     (pwm_l),
    .carrier   (carrier)
  );

endmodule
