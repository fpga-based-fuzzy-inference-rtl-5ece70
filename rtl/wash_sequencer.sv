// wash_sequencer: washing machine state machine and motor speed profile.
//
// After `start` it runs a wash cycle and then a spin-dry cycle, producing
// the signed speed reference (rpm) for the motor controller:
//   wash: ramp up to +wash_rpm, hold wash_hold ticks, ramp down to 0, then
//         the same profile towards -wash_rpm; wash_cycles such half-cycles
//         alternate in direction.
//   spin: ramp up to +spin_rpm, hold spin_hold ticks, ramp down; between
//         repeats it only comes down to wash_rpm, after the last of
//         spin_cycles repeats it comes down to a stop.
// The profile shapes follow the paper's description of the wash and
// spin-dry cycles; the state encoding, the tick-based timing, the user
// program inputs and the constant ramp rate (RAMP_STEP rpm per tick) are
// this design's choices. One tick is TICK_CYCLES clocks (1 ms by default).
// `stop` aborts to IDLE at once. `motor_en` is high from start to done;
// `done` pulses when the program ends.
module wash_sequencer #(
  parameter int unsigned TICK_CYCLES = 78_000,
  parameter int unsigned RAMP_STEP   = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // user commands
  input  logic               start,
  input  logic               stop,
  input  logic [15:0]        wash_rpm,
  input  logic [15:0]        spin_rpm,
  input  logic [15:0]        wash_hold,
  input  logic [15:0]        spin_hold,
  input  logic [7:0]         wash_cycles,
  input  logic [7:0]         spin_cycles,
  // outputs
  output logic signed [15:0] speed_ref,
  output logic               motor_en,
  output logic               washing,
  output logic               spinning,
  output logic               done
);

  typedef enum logic [2:0] {
    S_IDLE, S_WASH_ACC, S_WASH_HOLD, S_WASH_DEC,
    S_SPIN_ACC, S_SPIN_HOLD, S_SPIN_DEC
  } state_e;

  localparam int unsigned TW = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;

  state_e       state;
  logic [TW-1:0] pre;
  logic         tick;
  logic [15:0]  mag;        // speed magnitude
  logic         neg;        // wash direction
  logic [15:0]  hold_cnt;
  logic [7:0]   cyc;
  logic [15:0]  target;

  assign tick = (32'(pre) == TICK_CYCLES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pre <= '0;
    else if (tick)   pre <= '0;
    else             pre <= pre + 1'b1;
  end

  // ramp helpers
  logic [16:0] up_v, dn_v;
  logic        at_target_up, at_floor;
  logic [15:0] floor_v;
  always_comb begin
    target       = (state inside {S_WASH_ACC, S_WASH_HOLD, S_WASH_DEC}) ? wash_rpm : spin_rpm;
    up_v         = {1'b0, mag} + 17'(RAMP_STEP);
    floor_v      = (state == S_SPIN_DEC && cyc > 8'd1) ? wash_rpm : 16'd0;
    dn_v         = {1'b0, mag} - 17'(RAMP_STEP);
    at_target_up = (up_v >= {1'b0, target});
    at_floor     = dn_v[16] || (dn_v <= {1'b0, floor_v});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      mag      <= '0;
      neg      <= 1'b0;
      hold_cnt <= '0;
      cyc      <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (stop) begin
        state <= S_IDLE;
        mag   <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            neg <= 1'b0;
            mag <= '0;
            if (wash_cycles != '0) begin
              cyc   <= wash_cycles;
              state <= S_WASH_ACC;
            end else begin
              cyc   <= spin_cycles;
              state <= (spin_cycles != '0) ? S_SPIN_ACC : S_IDLE;
              done  <= (spin_cycles == '0);
            end
          end
          S_WASH_ACC: if (tick) begin
            mag <= at_target_up ? target : up_v[15:0];
            if (at_target_up) begin
              hold_cnt <= wash_hold;
              state    <= S_WASH_HOLD;
            end
          end
          S_WASH_HOLD: if (tick) begin
            if (hold_cnt == '0) state <= S_WASH_DEC;
            else                hold_cnt <= hold_cnt - 1'b1;
          end
          S_WASH_DEC: if (tick) begin
            mag <= at_floor ? 16'd0 : dn_v[15:0];
            if (at_floor) begin
              if (cyc == 8'd1) begin
                cyc   <= spin_cycles;
                neg   <= 1'b0;
                state <= (spin_cycles != '0) ? S_SPIN_ACC : S_IDLE;
                done  <= (spin_cycles == '0);
              end else begin
                cyc   <= cyc - 1'b1;
                neg   <= !neg;
                state <= S_WASH_ACC;
              end
            end
          end
          S_SPIN_ACC: if (tick) begin
            mag <= at_target_up ? target : up_v[15:0];
            if (at_target_up) begin
              hold_cnt <= spin_hold;
              state    <= S_SPIN_HOLD;
            end
          end
          S_SPIN_HOLD: if (tick) begin
            if (hold_cnt == '0) state <= S_SPIN_DEC;
            else                hold_cnt <= hold_cnt - 1'b1;
          end
          S_SPIN_DEC: if (tick) begin
            mag <= at_floor ? floor_v : dn_v[15:0];
            if (at_floor) begin
              if (cyc == 8'd1) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                cyc   <= cyc - 1'b1;
                state <= S_SPIN_ACC;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign speed_ref = neg ? -$signed(mag) : $signed(mag);
  assign motor_en  = (state != S_IDLE);
  assign washing   = (state inside {S_WASH_ACC, S_WASH_HOLD, S_WASH_DEC});
  assign spinning  = (state inside {S_SPIN_ACC, S_SPIN_HOLD, S_SPIN_DEC});

endmodule
