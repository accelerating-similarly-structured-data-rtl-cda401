// harp_pkg: constants shared by the range-partitioning accelerator (HARP) and its
// streaming framework.
//
// The baseline accelerator partitions 16-byte records on a 4-byte key with 127
// splitters, giving 255 partitions, and moves data in 64-byte bursts of four
// records. These numbers are the document's baseline configuration. The depth of
// each partition buffer (two bursts), the depth of the inbound stream buffer and of
// the fill request buffer are choices of this design.
package harp_pkg;
  localparam int unsigned REC_BYTES   = 16;
  localparam int unsigned KEY_BYTES   = 4;
  localparam int unsigned BURST_BYTES = 64;
  localparam int unsigned N_SPLITTERS = 127;
  localparam int unsigned N_PARTS     = 2 * N_SPLITTERS + 1;
  localparam int unsigned RECS_PER_BURST = BURST_BYTES / REC_BYTES;
  localparam int unsigned REC_W   = 8 * REC_BYTES;
  localparam int unsigned KEY_W   = 8 * KEY_BYTES;
  localparam int unsigned BURST_W = 8 * BURST_BYTES;
  // Records a partition buffer holds: two bursts.
  localparam int unsigned PB_DEPTH = 2 * RECS_PER_BURST;
  // Outbound stream buffer: one 64-byte entry per partition (document's sizing).
  localparam int unsigned SB_OUT_DEPTH = N_PARTS;
  // Inbound stream buffer depth (own choice).
  localparam int unsigned SB_IN_DEPTH  = 16;

  // Accelerator control state.
  typedef enum logic [1:0] {
    HARP_IDLE  = 2'd0,
    HARP_RUN   = 2'd1,
    HARP_DRAIN = 2'd2
  } harp_state_e;
endpackage
