// fis_pkg: widths, memory record layouts and shared types of the fuzzy
// inference system (FIS).
//
// The FIS works on 8-bit crisp values and 8-bit membership grades. Its
// memory holds two record types whose field order follows the paper:
//   membership function record (21 bits): <port#> <set#> <start> <end>
//   rule record                (22 bits): <rule#> IF <in#> is <set#>
//                                         <AND/OR> <in#> is <set#>
//                                         THEN <out#> is <set#>
// Field widths (2-bit port/output numbers for up to 4 inputs/outputs, 3-bit
// set numbers for up to 8 sets, 6-bit rule numbers for 64 rules) are this
// design's reading of the 21- and 22-bit word widths.
package fis_pkg;

  localparam int unsigned DATA_W   = 8;   // crisp value and grade resolution
  localparam int unsigned IO_W     = 2;   // input / output number
  localparam int unsigned SET_W    = 3;   // membership set number
  localparam int unsigned RULE_W   = 6;   // rule number
  localparam int unsigned MF_DEPTH = 1 << (IO_W + SET_W);   // 32 words
  localparam int unsigned RULE_DEPTH = 1 << RULE_W;         // 64 words
  localparam int unsigned MF_W     = IO_W + SET_W + 2 * DATA_W;           // 21
  localparam int unsigned RULE_REC_W = RULE_W + 3 * (IO_W + SET_W) + 1;   // 22
  localparam int unsigned SUM_W    = 16;  // single precision summer
  localparam int unsigned DSUM_W   = 32;  // double precision summer

  localparam logic [DATA_W-1:0] GRADE_ONE = '1;  // full membership (255)

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [IO_W-1:0]   io_t;
  typedef logic [SET_W-1:0]  set_t;

  typedef struct packed {
    io_t   port;
    set_t  set;
    data_t start_v;
    data_t end_v;
  } mf_rec_t;

  typedef enum logic {OP_AND = 1'b0, OP_OR = 1'b1} rule_op_e;

  typedef struct packed {
    logic [RULE_W-1:0] rule_no;
    io_t      in1;
    set_t     set1;
    rule_op_e op;
    io_t      in2;
    set_t     set2;
    io_t      out;
    set_t     oset;
  } rule_rec_t;

  // memory selected by the programming port
  typedef enum logic [1:0] {MEM_MF = 2'd0, MEM_RULE = 2'd1, MEM_WEIGHT = 2'd2} mem_sel_e;

  // operation requested from the min/max evaluator
  typedef enum logic [1:0] {MM_NONE = 2'd0, MM_PUSH = 2'd1, MM_MIN = 2'd2, MM_MAX = 2'd3} mm_cmd_e;

endpackage
