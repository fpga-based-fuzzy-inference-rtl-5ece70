// pwm3_modulator: three-phase sinusoidal PWM for the motor inverter.
//
// The paper's inverter has two independent control inputs, motor
// voltage and motor frequency, and the FPGA sets the duty cycles of the
// power switches so each phase sees a sinusoidal voltage. Here:
//   * `freq_dhz` (signed, 0.1 Hz units) drives a 32-bit phase accumulator;
//     a negative value turns the phase sequence round (reverse rotation);
//   * `amplitude` (0..255) scales a 256-entry sine table;
//   * phases B and C read the table 1/3 and 2/3 of a turn later;
//   * each duty, 128 + amplitude*sin/256, is sampled at the bottom of a
//     symmetric triangular carrier (0..255..0, one step every CARRIER_DIV
//     clocks) and compared with it.
// The sine table is computed at elaboration with Bhaskara's rational
// approximation sin(x) ~ 4p/(20480-p), p = t(128-t), t = table index within
// a half turn (error under 0.2% of full scale). Carrier, table size and
// complementary high/low outputs are this design's choices; dead time is not
// provided. With `enable` low all six gates are off.
module pwm3_modulator #(
  parameter int unsigned CLK_HZ      = 78_000_000,
  parameter int unsigned CARRIER_DIV = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [7:0]        amplitude,
  input  logic signed [15:0] freq_dhz,
  output logic [2:0]        pwm_h,
  output logic [2:0]        pwm_l,
  output logic [7:0]        carrier
);

  // phase increment per clock = freq_dhz * 2^32 / (10*CLK_HZ) = (freq_dhz*KF) >> 16
  localparam longint KF = longint'((64'd1 << 48) / (64'd10 * CLK_HZ));
  localparam int unsigned DIV_W = (CARRIER_DIV > 1) ? $clog2(CARRIER_DIV) : 1;

  function automatic logic signed [7:0] sin_val(input int unsigned i);
    int unsigned t, p, v;
    t = i % 128;
    p = t * (128 - t);
    v = (127 * 4 * p + (20480 - p) / 2) / (20480 - p);
    return (i < 128) ? 8'(v) : -8'(v);
  endfunction

  logic signed [7:0] sin_lut [256];
  for (genvar i = 0; i < 256; i++) begin : g_lut
    assign sin_lut[i] = sin_val(i);
  end

  logic [31:0]       phase;
  logic signed [35:0] inc_full;
  assign inc_full = 36'(freq_dhz) * 36'(KF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       phase <= '0;
    else if (enable)  phase <= phase + 32'(inc_full >>> 16);
  end

  // triangular carrier
  logic [DIV_W-1:0] div_cnt;
  logic             up;
  logic             step;
  assign step = (32'(div_cnt) == CARRIER_DIV - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      carrier <= '0;
      up      <= 1'b1;
    end else begin
      div_cnt <= step ? '0 : div_cnt + 1'b1;
      if (step) begin
        if (up) begin
          if (carrier == 8'd254) up <= 1'b0;
          carrier <= carrier + 1'b1;
        end else begin
          if (carrier == 8'd1) up <= 1'b1;
          carrier <= carrier - 1'b1;
        end
      end
    end
  end

  // duty of each phase, sampled at the carrier bottom
  logic [7:0] idx [3];
  logic [7:0] duty_next [3];
  logic [7:0] duty [3];
  localparam logic [7:0] OFFS [3] = '{8'd0, 8'd85, 8'd171};

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      logic signed [16:0] prod;
      idx[k]       = phase[31:24] - OFFS[k];
      prod         = $signed({9'd0, amplitude}) * 17'(sin_lut[idx[k]]);
      duty_next[k] = 8'(9'sd128 + 9'(prod >>> 8));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) duty[k] <= 8'd128;
    end else if (step && !up && carrier == 8'd1) begin
      for (int k = 0; k < 3; k++) duty[k] <= duty_next[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm_h <= '0;
      pwm_l <= '0;
    end else begin
      for (int k = 0; k < 3; k++) begin
        pwm_h[k] <= enable && (duty[k] > carrier);
        pwm_l[k] <= enable && !(duty[k] > carrier);
      end
    end
  end

endmodule
