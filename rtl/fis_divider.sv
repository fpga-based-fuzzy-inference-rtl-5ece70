// fis_divider: sequential unsigned restoring divider.
//
// Used as the defuzzification divider (sum of strength*weight over sum of
// strengths, centre of gravity) and, at a smaller size, inside the fire
// strength calculator and the speed meter. The paper names a divider
// that produces the crisp value; the radix-2 restoring algorithm, one
// quotient bit per clock, is this design's choice.
//
// Interface: pulse `start` with `num`/`den` valid; `busy` is high while
// dividing; `done` pulses for one cycle when `quot`/`rem` are valid.
// They hold until the next start. A zero denominator gives
// quot = all ones and sets `div_zero`.
// Timing: done comes NUM_W+1 cycles after start.
module fis_divider #(
  parameter int unsigned NUM_W = 32,
  parameter int unsigned DEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quot,
  output logic [DEN_W-1:0] rem,
  output logic             div_zero
);

  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] q_r;
  logic [DEN_W:0]   r_r;      // one extra bit for the trial subtraction
  logic [DEN_W-1:0] d_r;
  logic [CNT_W-1:0] cnt;
  logic             run;

  logic [DEN_W:0] shifted;
  logic [DEN_W:0] diff;

  always_comb begin
    shifted = {r_r[DEN_W-1:0], q_r[NUM_W-1]};
    diff    = shifted - {1'b0, d_r};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r      <= '0;
      r_r      <= '0;
      d_r      <= '0;
      cnt      <= '0;
      run      <= 1'b0;
      done     <= 1'b0;
      div_zero <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        q_r      <= num;
        r_r      <= '0;
        d_r      <= den;
        cnt      <= CNT_W'(NUM_W);
        run      <= 1'b1;
        div_zero <= (den == '0);
      end else if (run) begin
        if (diff[DEN_W]) begin          // negative: restore
          r_r <= shifted;
          q_r <= {q_r[NUM_W-2:0], 1'b0};
        end else begin
          r_r <= diff;
          q_r <= {q_r[NUM_W-2:0], 1'b1};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign busy = run;
  assign quot = q_r;
  assign rem  = r_r[DEN_W-1:0];

endmodule
