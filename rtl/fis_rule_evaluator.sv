// fis_rule_evaluator: control unit of the fuzzy inference system.
//
// On `start` it waits until the input registers report a fresh input set,
// takes it (`consume`), and then, for each output in turn, reads the rules
// from the rule memory one by one in address order. A rule whose THEN part
// names the current output is executed:
//   1. the membership address {in1,set1} goes to the membership memory and
//      the fire strength calculator grades input in1; the grade is pushed on
//      the min/max stack;
//   2. the same for {in2,set2};
//   3. MIN (AND) or MAX (OR) is requested from the min/max evaluator;
//   4. the summer adds the rule strength, the multiplier forms strength times
//      the output weight {out,oset}, and the double summer adds the product.
// After the last rule the divider forms the centre of gravity, which is
// written to output register `out_idx`; the accumulators are cleared and the
// next output is processed. `done` pulses after the last output.
// This sequence follows the paper's description of the rule evaluator;
// the state encoding, the one-output-per-pass scan and the `rule_count`
// input (number of valid rules) are this design's choices.
// Timing per executed rule: about 2 + 2*(2..19) + 4 cycles; a rule of
// another output costs 2 cycles; each output adds a 34-cycle division.
module fis_rule_evaluator
  import fis_pkg::*;
#(
  parameter int unsigned NUM_OUTPUTS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [RULE_W:0]   rule_count,   // 0..64 valid rules
  output logic              busy,
  output logic              done,
  // input registers
  input  logic              inputs_ready,
  output logic              consume,
  output io_t               in_sel,
  // memory
  output logic [RULE_W-1:0] rule_addr,
  input  rule_rec_t         rule_data,
  output logic [IO_W+SET_W-1:0] mf_addr,
  output logic [IO_W+SET_W-1:0] w_addr,
  // fire strength calculator
  output logic              fs_start,
  input  logic              fs_ready,
  // min/max evaluator
  output mm_cmd_e           mm_cmd,
  input  logic              mm_valid,
  // summers
  output logic              acc_clr,
  output logic              sum_add,
  output logic              dsum_add,
  // divider
  output logic              div_start,
  input  logic              div_done,
  // output registers
  output logic              out_we,
  output io_t               out_idx
);

  typedef enum logic [3:0] {
    S_IDLE, S_CHECK, S_FETCH, S_DECODE, S_MF, S_FS, S_FSW,
    S_OP, S_OPW, S_ACC, S_NEXT, S_DIV, S_DIVW
  } state_e;

  state_e        state;
  logic [RULE_W:0] r;        // rule pointer, one bit wider than the address
  io_t           o;          // output being computed
  logic          second;     // evaluating the second antecedent
  rule_rec_t     rule_r;

  assign rule_addr = r[RULE_W-1:0];
  assign mf_addr   = second ? {rule_r.in2, rule_r.set2} : {rule_r.in1, rule_r.set1};
  assign in_sel    = second ? rule_r.in2 : rule_r.in1;
  assign w_addr    = {rule_r.out, rule_r.oset};
  assign out_idx   = o;
  assign busy      = (state != S_IDLE);

  logic last_rule;
  assign last_rule = (r + 1'b1 >= rule_count);

  always_comb begin
    consume   = 1'b0;
    fs_start  = 1'b0;
    mm_cmd    = MM_NONE;
    acc_clr   = 1'b0;
    sum_add   = 1'b0;
    dsum_add  = 1'b0;
    div_start = 1'b0;
    out_we    = 1'b0;
    unique case (state)
      S_CHECK: if (inputs_ready) begin
        consume = 1'b1;
        acc_clr = 1'b1;
      end
      S_FS:    fs_start = 1'b1;
      S_FSW:   if (fs_ready) mm_cmd = MM_PUSH;
      S_OP:    mm_cmd = (rule_r.op == OP_OR) ? MM_MAX : MM_MIN;
      S_OPW:   if (mm_valid) sum_add = 1'b1;
      S_ACC:   dsum_add = 1'b1;
      S_DIV:   div_start = 1'b1;
      S_DIVW:  if (div_done) begin
        out_we  = 1'b1;
        acc_clr = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      r      <= '0;
      o      <= '0;
      second <= 1'b0;
      rule_r <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) state <= S_CHECK;
        S_CHECK: if (inputs_ready) begin
          r     <= '0;
          o     <= '0;
          state <= (rule_count == '0) ? S_DIV : S_FETCH;
        end
        // rule memory reads address r on this edge
        S_FETCH: state <= S_DECODE;
        S_DECODE: begin
          rule_r <= rule_data;
          second <= 1'b0;
          if (rule_data.out == o) begin
            state <= S_MF;
          end else if (last_rule) begin
            state <= S_DIV;
          end else begin
            r     <= r + 1'b1;
            state <= S_FETCH;
          end
        end
        // membership memory reads mf_addr on this edge
        S_MF:  state <= S_FS;
        S_FS:  state <= S_FSW;
        S_FSW: if (fs_ready) begin
          if (second) begin
            state <= S_OP;
          end else begin
            second <= 1'b1;
            state  <= S_MF;
          end
        end
        S_OP:  state <= S_OPW;
        // strength is valid: summer adds it, multiplier registers it * weight
        S_OPW: if (mm_valid) state <= S_ACC;
        S_ACC: state <= S_NEXT;
        S_NEXT: begin
          if (last_rule) begin
            state <= S_DIV;
          end else begin
            r     <= r + 1'b1;
            state <= S_FETCH;
          end
        end
        S_DIV: state <= S_DIVW;
        S_DIVW: if (div_done) begin
          if (32'(o) == NUM_OUTPUTS - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            o     <= o + 1'b1;
            r     <= '0;
            state <= (rule_count == '0) ? S_DIV : S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
