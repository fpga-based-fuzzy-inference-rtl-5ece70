// fis_fire_strength: fire strength calculator of the FIS.
//
// Gives the degree of membership (0..255) of the crisp input `x` in the
// membership function record `mf` read from the membership memory. The
// paper stores each function as <start_value> and <end_value> only, so
// this design reads a record as a triangle: grade 0 at start and end, full
// grade 255 at the midpoint c = (start+end)/2, linear in between. Two edge
// conventions give the shoulder shapes a controller needs: start = 0 makes
// the left flank flat at 255 and end = 255 makes the right flank flat at 255.
// A record whose <port#><set#> tag differs from `tag` (the address asked
// for) or whose start exceeds its end is treated as empty (grade 0).
//
// The flank value 255*(x-start)/(c-start) (or 255*(end-x)/(end-c)) is
// computed with a 16/8-bit sequential divider.
// Interface: pulse `start` with x, mf and tag valid and held until `ready`.
// `ready` pulses for one cycle with `mu` valid (held until the next start).
// Timing: `ready` comes 1 cycle after `start` when no division is needed
// (grade 0 or 255) and 18 cycles after it otherwise.
module fis_fire_strength
  import fis_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  data_t   x,
  input  mf_rec_t mf,
  input  logic [IO_W+SET_W-1:0] tag,
  output data_t   mu,
  output logic    ready,
  output logic    busy
);

  typedef enum logic {S_IDLE, S_DIV} state_e;
  state_e state;

  logic [8:0]  sum_se;
  data_t       c;
  logic        outside, left_side;
  data_t       num8, den8;
  logic        flat;

  always_comb begin
    sum_se    = {1'b0, mf.start_v} + {1'b0, mf.end_v};
    c         = sum_se[8:1];
    outside   = ({mf.port, mf.set} != tag) || (mf.start_v > mf.end_v) ||
                (x < mf.start_v) || (x > mf.end_v);
    left_side = (x <= c);
    if (left_side) begin
      num8 = x - mf.start_v;
      den8 = c - mf.start_v;
      flat = (mf.start_v == '0) || (den8 == '0);
    end else begin
      num8 = mf.end_v - x;
      den8 = mf.end_v - c;
      flat = (mf.end_v == GRADE_ONE) || (den8 == '0);
    end
  end

  logic        div_start, div_done, div_busy, div_zero;
  logic [15:0] div_q;
  logic [7:0]  div_r;

  // num*255 = (num << 8) - num
  fis_divider #(.NUM_W(16), .DEN_W(8)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .num      ({num8, 8'h00} - {8'h00, num8}),
    .den      (den8),
    .busy     (div_busy),
    .done     (div_done),
    .quot     (div_q),
    .rem      (div_r),
    .div_zero (div_zero)
  );

  assign div_start = (state == S_IDLE) && start && !outside && !flat;
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      mu    <= '0;
      ready <= 1'b0;
    end else begin
      ready <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (outside) begin
            mu    <= '0;
            ready <= 1'b1;
          end else if (flat) begin
            mu    <= GRADE_ONE;
            ready <= 1'b1;
          end else begin
            state <= S_DIV;
          end
        end
        S_DIV: if (div_done) begin
          // quotient never exceeds 255 since num <= den
          mu    <= div_q[7:0];
          ready <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
