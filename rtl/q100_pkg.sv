// q100_pkg: widths, operation codes and tile counts shared by the Q100 database
// processing unit.
//
// Widths follow the document's tile table: columns are up to 32 bytes (256 bits),
// table records up to 128 bytes (1024 bits), the sorter, joiner and partitioner
// compare 64-bit keys, and the ALU works on 64-bit values. The sorter holds 1024
// records. Tile counts are those of the document's balanced ("Pareto")
// configuration: 2 partitioners, 1 sorter, 4 ALUs, and the maximum useful count of
// each small tile; 6 inbound and 2 outbound stream buffers.
//
// Every stream in the Q100 is a valid/ready handshake carrying a data word and an
// end-of-stream flag. A beat with eos set carries no data and closes the column or
// table; every stream ends with exactly one such beat. This convention is this
// design's own.
package q100_pkg;
  localparam int unsigned COL_W  = 256;
  localparam int unsigned REC_W  = 1024;
  localparam int unsigned KEY_W  = 64;
  localparam int unsigned ALU_W  = 64;
  localparam int unsigned SORT_N = 1024;
  // Partitioner size (own choice: the smallest HARP design point, 7 splitters).
  localparam int unsigned PART_SPLIT = 7;

  // Pareto tile mix.
  localparam int unsigned N_AGG   = 4;
  localparam int unsigned N_ALU   = 4;
  localparam int unsigned N_BOOL  = 6;
  localparam int unsigned N_CFILT = 6;
  localparam int unsigned N_JOIN  = 4;
  localparam int unsigned N_PART  = 2;
  localparam int unsigned N_SORT  = 1;
  localparam int unsigned N_APP   = 8;
  localparam int unsigned N_CSEL  = 7;
  localparam int unsigned N_CAT   = 2;
  localparam int unsigned N_STCH  = 3;
  localparam int unsigned N_SBIN  = 6;
  localparam int unsigned N_SBOUT = 2;
  // Columns a stitcher takes (own choice: four 256-bit columns fill a record).
  localparam int unsigned STITCH_IN = 4;

  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,
    ALU_SUB  = 3'd1,
    ALU_MUL  = 3'd2,
    ALU_DIV  = 3'd3,
    ALU_AND  = 3'd4,
    ALU_OR   = 3'd5,
    ALU_NOT  = 3'd6
  } alu_op_e;

  typedef enum logic [2:0] {
    CMP_EQ  = 3'd0,
    CMP_NEQ = 3'd1,
    CMP_LT  = 3'd2,
    CMP_LTE = 3'd3,
    CMP_GT  = 3'd4,
    CMP_GTE = 3'd5
  } cmp_op_e;

  typedef enum logic [2:0] {
    AGG_SUM   = 3'd0,
    AGG_COUNT = 3'd1,
    AGG_MIN   = 3'd2,
    AGG_MAX   = 3'd3,
    AGG_AVG   = 3'd4
  } agg_op_e;
endpackage
