// fis_double_summer: double precision accumulator of the FIS.
//
// Accumulates the 16-bit products strength*weight; the total is the
// numerator of the centre-of-gravity division. `clr` empties it, `add`
// adds `din` on the clock edge (clr wins). It is twice as wide (32 bits) as
// the single precision summer, as the paper's naming suggests; 64 rules
// of 255*255 need only 22 bits, so it cannot overflow.
module fis_double_summer
  import fis_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              add,
  input  logic [15:0]       din,
  output logic [DSUM_W-1:0] sum
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sum <= '0;
    else if (clr) sum <= '0;
    else if (add) sum <= sum + DSUM_W'(din);
  end

endmodule
