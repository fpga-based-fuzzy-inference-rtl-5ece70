// fis_multiplier: multiplies the evaluated rule strength by the rule's
// output weight for the centre-of-gravity numerator.
//
// Unsigned A_W x B_W -> A_W+B_W bits, registered once: the product of the
// operands present at a clock edge appears after that edge. The paper
// names the multiplier and its function; the single register stage is this
// design's choice.
module fis_multiplier #(
  parameter int unsigned A_W = 8,
  parameter int unsigned B_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic [A_W+B_W-1:0] p
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p <= (A_W+B_W)'(a) * (A_W+B_W)'(b);
  end

endmodule
