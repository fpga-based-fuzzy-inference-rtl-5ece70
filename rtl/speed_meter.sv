// speed_meter: rotor speed measurement from the rotor position pulses.
//
// The rotor position detector gives PULSES_PER_REV pulses per revolution.
// As in the paper, speed is found from the time between consecutive
// pulses (not by counting pulses in a window): a prescaler makes a tick at
// TICK_HZ, a counter counts ticks between rising edges of `pos_pulse`, and a
// sequential divider turns the period into rpm:
//   rpm = 60 * TICK_HZ / (PULSES_PER_REV * period_ticks)
// Every measured pulse raises `sample` for one cycle: the request that
// starts a control step. When no pulse arrives for TIMEOUT_TICKS ticks the
// motor is taken as stopped: speed 0, `stalled` set, and `sample` still
// raised so control goes on at standstill (this design's choice).
// `pos_pulse` is asynchronous and passes a two-flop synchroniser.
// Timing: `sample` comes 36 cycles after the synchronised edge.
module speed_meter #(
  parameter int unsigned CLK_HZ         = 78_000_000,
  parameter int unsigned TICK_HZ        = 1_000_000,
  parameter int unsigned PULSES_PER_REV = 24,
  parameter int unsigned TIMEOUT_TICKS  = 65_535
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pos_pulse,
  output logic [15:0] speed_rpm,
  output logic [15:0] period_ticks,
  output logic        sample,
  output logic        stalled
);

  localparam int unsigned PRESC  = CLK_HZ / TICK_HZ;
  localparam int unsigned PRE_W  = (PRESC > 1) ? $clog2(PRESC) : 1;
  localparam logic [31:0] RPM_K  = 32'(64'(60) * TICK_HZ / PULSES_PER_REV);

  logic [2:0]       sync;
  logic             edge_det;
  logic [PRE_W-1:0] pre;
  logic             tick;
  logic [15:0]      cnt;
  logic             timeout;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], pos_pulse};
  end
  assign edge_det = sync[1] && !sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0;
    end else if (32'(pre) == PRESC - 1) begin
      pre <= '0;
    end else begin
      pre <= pre + 1'b1;
    end
  end
  assign tick    = (32'(pre) == PRESC - 1);
  assign timeout = tick && (32'(cnt) >= TIMEOUT_TICKS - 1);

  logic        div_start, div_busy, div_done, div_zero;
  logic [31:0] div_q;
  logic [15:0] div_r;

  fis_divider #(.NUM_W(32), .DEN_W(16)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .num      (RPM_K),
    .den      (cnt),
    .busy     (div_busy),
    .done     (div_done),
    .quot     (div_q),
    .rem      (div_r),
    .div_zero (div_zero)
  );
  assign div_start = edge_det && !div_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      period_ticks <= '0;
      speed_rpm    <= '0;
      sample       <= 1'b0;
      stalled      <= 1'b1;
    end else begin
      sample <= 1'b0;
      if (edge_det) begin
        period_ticks <= cnt;
        cnt          <= '0;
      end else if (timeout) begin
        cnt       <= '0;
        speed_rpm <= '0;
        stalled   <= 1'b1;
        sample    <= 1'b1;
      end else if (tick) begin
        cnt <= cnt + 1'b1;
      end
      if (div_done) begin
        speed_rpm <= div_zero ? 16'hFFFF :
                     (div_q > 32'hFFFF) ? 16'hFFFF : div_q[15:0];
        stalled   <= 1'b0;
        sample    <= 1'b1;
      end
    end
  end

endmodule
