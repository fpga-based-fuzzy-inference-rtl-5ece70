// fis_top: general purpose fuzzy inference system (FIS).
//
// Up to four 8-bit crisp inputs, up to four 8-bit crisp outputs, up to
// eight membership sets per input and 64 rules of the form
//   IF in_a is set_x AND/OR in_b is set_y THEN out_k is set_z.
// Inference is Mamdani min/max; defuzzification is the centre of gravity
//   out_k = sum(strength_i * weight_i) / sum(strength_i)
// over the rules of output k, where weight_i is the programmed coefficient
// of the rule's output set. The structure follows the paper's module
// list: input registers, memory, rule evaluator, fire strength calculator,
// min/max evaluator, multiplier, summer, double summer and divider.
//
// Use: program the tables through prog_* (see fis_memory), set rule_count,
// load the inputs with in_load, pulse start. `done` pulses when every output
// register is updated. An output none of whose rules fired reads 0 with its
// `out_nofire` flag set. Start may come before the inputs are loaded: the
// evaluator then waits for them.
module fis_top
  import fis_pkg::*;
#(
  parameter int unsigned NUM_INPUTS  = 4,
  parameter int unsigned NUM_OUTPUTS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // table programming
  input  logic                  prog_we,
  input  mem_sel_e              prog_sel,
  input  logic [RULE_W-1:0]     prog_addr,
  input  logic [RULE_REC_W-1:0] prog_data,
  input  logic [RULE_W:0]       rule_count,
  // inputs
  input  logic                  in_load,
  input  data_t                 in_data [NUM_INPUTS],
  output logic                  inputs_ready,
  // control
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  // outputs
  output data_t                 out_data   [NUM_OUTPUTS],
  output logic [NUM_OUTPUTS-1:0] out_nofire
);

  // evaluator <-> datapath
  logic                  consume;
  io_t                   in_sel;
  data_t                 x_sel;
  logic [RULE_W-1:0]     rule_addr;
  rule_rec_t             rule_data;
  logic [IO_W+SET_W-1:0] mf_addr, w_addr;
  mf_rec_t               mf_data;
  data_t                 w_data;
  logic                  fs_start, fs_ready, fs_busy;
  data_t                 mu;
  mm_cmd_e               mm_cmd;
  logic                  mm_valid;
  data_t                 strength;
  logic                  acc_clr, sum_add, dsum_add;
  logic [15:0]           product;
  logic [SUM_W-1:0]      den;
  logic [DSUM_W-1:0]     num;
  logic                  div_start, div_done, div_busy, div_zero;
  logic [DSUM_W-1:0]     quot;
  logic [SUM_W-1:0]      rem;
  logic                  out_we;
  io_t                   out_idx;

  fis_input_regs #(.NUM_INPUTS(NUM_INPUTS)) u_inregs (
    .clk, .rst_n,
    .load      (in_load),
    .in_data   (in_data),
    .consume   (consume),
    .sel       (in_sel),
    .sel_value (x_sel),
    .ready     (inputs_ready)
  );

  fis_memory u_mem (
    .clk,
    .prog_we, .prog_sel, .prog_addr, .prog_data,
    .mf_addr   (mf_addr),
    .mf_data   (mf_data),
    .rule_addr (rule_addr),
    .rule_data (rule_data),
    .w_addr    (w_addr),
    .w_data    (w_data)
  );

  fis_rule_evaluator #(.NUM_OUTPUTS(NUM_OUTPUTS)) u_eval (
    .clk, .rst_n,
    .start, .rule_count, .busy, .done,
    .inputs_ready, .consume, .in_sel,
    .rule_addr, .rule_data, .mf_addr, .w_addr,
    .fs_start, .fs_ready,
    .mm_cmd, .mm_valid,
    .acc_clr, .sum_add, .dsum_add,
    .div_start, .div_done,
    .out_we, .out_idx
  );

  fis_fire_strength u_fs (
    .clk, .rst_n,
    .start (fs_start),
    .x     (x_sel),
    .mf    (mf_data),
    .tag   (mf_addr),
    .mu    (mu),
    .ready (fs_ready),
    .busy  (fs_busy)
  );

  fis_minmax u_mm (
    .clk, .rst_n,
    .cmd    (mm_cmd),
    .din    (mu),
    .result (strength),
    .valid  (mm_valid)
  );

  fis_multiplier #(.A_W(DATA_W), .B_W(DATA_W)) u_mul (
    .clk, .rst_n,
    .a (strength),
    .b (w_data),
    .p (product)
  );

  fis_summer u_sum (
    .clk, .rst_n,
    .clr (acc_clr),
    .add (sum_add),
    .din (strength),
    .sum (den)
  );

  fis_double_summer u_dsum (
    .clk, .rst_n,
    .clr (acc_clr),
    .add (dsum_add),
    .din (product),
    .sum (num)
  );

  fis_divider #(.NUM_W(DSUM_W), .DEN_W(SUM_W)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .num      (num),
    .den      (den),
    .busy     (div_busy),
    .done     (div_done),
    .quot     (quot),
    .rem      (rem),
    .div_zero (div_zero)
  );

  // output registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_OUTPUTS; i++) out_data[i] <= '0;
      out_nofire <= '0;
    end else if (out_we) begin
      for (int i = 0; i < NUM_OUTPUTS; i++) begin
        if (int'(out_idx) == i) begin
          out_data[i]   <= div_zero ? '0 :
                           (quot > DSUM_W'(GRADE_ONE)) ? GRADE_ONE : quot[DATA_W-1:0];
          out_nofire[i] <= div_zero;
        end
      end
    end
  end

endmodule
