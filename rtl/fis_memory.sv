// fis_memory: rule base and membership function store of the FIS.
//
// Three programmable tables, each with one synchronous read port
// (data valid the cycle after the address):
//   mf     32 x 21 bits: <port#><set#><start><end>, addressed by {input, set}
//   rule   64 x 22 bits: one rule per word, evaluated in address order
//   weight 32 x  8 bits: output coefficient of set <set#> of output <out#>,
//          addressed by {output, set}
// The paper stores membership functions and rules in EPROMs of 32x21 and
// 64x22 words and fetches the rule output weight "from the EPROM". The
// separate weight table, and the write port that stands in for EPROM
// programming (prog_we with prog_sel choosing the table), are this design's
// choices. Tables are not reset; unprogrammed words hold unknown data.
module fis_memory
  import fis_pkg::*;
(
  input  logic                  clk,
  // programming port
  input  logic                  prog_we,
  input  mem_sel_e              prog_sel,
  input  logic [RULE_W-1:0]     prog_addr,
  input  logic [RULE_REC_W-1:0] prog_data,
  // read ports
  input  logic [IO_W+SET_W-1:0] mf_addr,
  output mf_rec_t               mf_data,
  input  logic [RULE_W-1:0]     rule_addr,
  output rule_rec_t             rule_data,
  input  logic [IO_W+SET_W-1:0] w_addr,
  output data_t                 w_data
);

  logic [MF_W-1:0]       mf_mem   [MF_DEPTH];
  logic [RULE_REC_W-1:0] rule_mem [RULE_DEPTH];
  data_t                 w_mem    [MF_DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we) begin
      unique case (prog_sel)
        MEM_MF:     mf_mem[prog_addr[IO_W+SET_W-1:0]] <= prog_data[MF_W-1:0];
        MEM_RULE:   rule_mem[prog_addr]                <= prog_data;
        MEM_WEIGHT: w_mem[prog_addr[IO_W+SET_W-1:0]]  <= prog_data[DATA_W-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    mf_data   <= mf_rec_t'(mf_mem[mf_addr]);
    rule_data <= rule_rec_t'(rule_mem[rule_addr]);
    w_data    <= w_mem[w_addr];
  end

endmodule
