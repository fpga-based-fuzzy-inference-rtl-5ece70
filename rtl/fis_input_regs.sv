// fis_input_regs: input register bank of the fuzzy inference system.
//
// Holds up to four 8-bit crisp inputs. A `load` strobe captures the whole
// input vector at once and sets `ready`; the rule evaluator clears `ready`
// with `consume` when it accepts the set for an inference, so every
// inference runs on one consistent, freshly loaded set. During rule
// evaluation the evaluator reads one input through the `sel` pointer
// (combinational read). The paper only names this module and says the
// evaluator checks that the inputs are ready; the load/consume handshake is
// this design's choice.
module fis_input_regs
  import fis_pkg::*;
#(
  parameter int unsigned NUM_INPUTS = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  data_t in_data [NUM_INPUTS],
  input  logic  consume,
  input  io_t   sel,
  output data_t sel_value,
  output logic  ready
);

  data_t regs [NUM_INPUTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_INPUTS; i++) regs[i] <= '0;
      ready <= 1'b0;
    end else begin
      if (load) begin
        for (int i = 0; i < NUM_INPUTS; i++) regs[i] <= in_data[i];
        ready <= 1'b1;
      end else if (consume) begin
        ready <= 1'b0;
      end
    end
  end

  // inputs beyond NUM_INPUTS read as zero
  always_comb begin
    sel_value = '0;
    for (int i = 0; i < NUM_INPUTS; i++)
      if (int'(sel) == i) sel_value = regs[i];
  end

endmodule
