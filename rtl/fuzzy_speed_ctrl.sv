// fuzzy_speed_ctrl: fuzzy PM motor speed controller around the FIS.
//
// On every speed sample (one per rotor position pulse, or a standstill
// timeout) it forms the two FIS inputs
//   in0 = 128 + e  / 2^E_SHIFT,   e  = |speed_ref| - speed      (rpm)
//   in1 = 128 + de / 2^DE_SHIFT,  de = e - e of the previous sample
// (each saturated to 0..255), loads them into the FIS input registers and
// starts an inference. FIS output 0 is a voltage change centred on 128:
// when the inference ends, out0 - 128 is added to a 12-bit voltage
// accumulator (saturated to 0..4095) whose top 8 bits are the inverter
// voltage command. If no rule fired the voltage is left as it was.
// The frequency command follows the speed reference:
//   freq_dhz = speed_ref * POLE_PAIRS / 6   (0.1 Hz units, signed)
// The paper says only that the FIS controls the motor through the
// inverter's voltage and frequency inputs from the measured speed; the
// error / change-of-error inputs, the incremental (PI-like) use of the
// output and the scalings are this design's choices.
// FIS inputs 2 and 3, when the FIS has them, are driven with 0.
// A sample that arrives while an inference is still running is dropped and
// flagged on `overrun` for one cycle. With `enable` low the voltage and the
// stored error are cleared.
module fuzzy_speed_ctrl
  import fis_pkg::*;
#(
  parameter int unsigned NUM_INPUTS = 4,
  parameter int unsigned POLE_PAIRS = 4,
  parameter int unsigned E_SHIFT    = 2,
  parameter int unsigned DE_SHIFT   = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic signed [15:0] speed_ref,
  input  logic [15:0]        speed_rpm,
  input  logic               sample,
  // FIS side
  output logic               fis_load,
  output data_t              fis_in [NUM_INPUTS],
  output logic               fis_start,
  input  logic               fis_done,
  input  data_t              fis_out,
  input  logic               fis_nofire,
  // inverter commands
  output logic [7:0]         volt_cmd,
  output logic signed [15:0] freq_dhz,
  output logic               busy,
  output logic               overrun
);

  localparam longint FREQ_K = longint'((POLE_PAIRS * 65536 + 3) / 6);

  logic signed [17:0] e, de, e_prev;
  logic [15:0]        ref_mag;
  logic [11:0]        volt_acc;
  data_t              in0, in1;

  function automatic data_t to_input(input logic signed [17:0] v, input int unsigned sh);
    logic signed [17:0] s;
    s = (v >>> sh) + 18'sd128;
    if (s < 0)         return 8'd0;
    else if (s > 255)  return 8'd255;
    else               return s[7:0];
  endfunction

  always_comb begin
    ref_mag = speed_ref[15] ? 16'(-speed_ref) : 16'(speed_ref);
    e       = $signed({2'b00, ref_mag}) - $signed({2'b00, speed_rpm});
    de      = e - e_prev;
    in0     = to_input(e, E_SHIFT);
    in1     = to_input(de, DE_SHIFT);
  end

  always_comb begin
    for (int i = 0; i < NUM_INPUTS; i++) fis_in[i] = '0;
    fis_in[0] = in0;
    if (NUM_INPUTS > 1) fis_in[1] = in1;
  end

  logic go;
  assign go        = enable && sample && !busy;
  assign fis_load  = go;
  assign fis_start = go;

  logic signed [13:0] vsum;
  assign vsum = $signed({2'b00, volt_acc}) + 14'($signed({1'b0, fis_out}) - 9'sd128);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev   <= '0;
      volt_acc <= '0;
      busy     <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      overrun <= enable && sample && busy;
      if (!enable) begin
        e_prev   <= '0;
        volt_acc <= '0;
        busy     <= 1'b0;
      end else begin
        if (go) begin
          e_prev <= e;
          busy   <= 1'b1;
        end
        if (fis_done && busy) begin
          busy <= 1'b0;
          if (!fis_nofire) begin
            if (vsum < 0)            volt_acc <= '0;
            else if (vsum > 14'sd4095) volt_acc <= 12'hFFF;
            else                      volt_acc <= vsum[11:0];
          end
        end
      end
    end
  end

  logic signed [39:0] fprod;
  assign fprod    = 40'(speed_ref) * 40'(FREQ_K);
  assign freq_dhz = 16'(fprod >>> 16);
  assign volt_cmd = volt_acc[11:4];

endmodule
