// fis_minmax: min/max evaluator of the FIS.
//
// A two-register stack. MM_PUSH shifts the stack down and places `din` on
// top; MM_MIN (fuzzy AND) and MM_MAX (fuzzy OR) combine the two entries and
// put the result on `result`, which feeds the multiplier and the summer.
// This follows the paper's description of a two-register stack on which
// a minimum or maximum is performed after two pushes. `valid` pulses for one
// cycle the cycle after a MIN/MAX command, when `result` is new.
module fis_minmax
  import fis_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mm_cmd_e cmd,
  input  data_t   din,
  output data_t   result,
  output logic    valid
);

  data_t top_r, bot_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_r  <= '0;
      bot_r  <= '0;
      result <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (cmd)
        MM_PUSH: begin
          bot_r <= top_r;
          top_r <= din;
        end
        MM_MIN: begin
          result <= (top_r < bot_r) ? top_r : bot_r;
          valid  <= 1'b1;
        end
        MM_MAX: begin
          result <= (top_r > bot_r) ? top_r : bot_r;
          valid  <= 1'b1;
        end
        default: ;
      endcase
    end
  end

endmodule
