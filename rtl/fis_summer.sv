// fis_summer: single precision summer of the FIS.
//
// Accumulates the evaluated strength of each rule; the total is the
// denominator of the centre-of-gravity division. `clr` empties the
// accumulator, `add` adds `din` on the clock edge (clr wins). 16 bits hold
// 64 rules of strength up to 255 with no overflow; the width is this
// design's reading of "single precision".
module fis_summer
  import fis_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             add,
  input  data_t            din,
  output logic [SUM_W-1:0] sum
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sum <= '0;
    else if (clr) sum <= '0;
    else if (add) sum <= sum + SUM_W'(din);
  end

endmodule
