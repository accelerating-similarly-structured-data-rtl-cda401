// asd_top: the two accelerators for structured database data, side by side.
//
// The first is the range partitioning system: the HARP partitioner with its
// inbound and outbound stream buffers and the stream-aware fill path of the last
// level cache, as attached to one processor core. The second is the Q100 database
// processing unit, an array of relational tiles in its balanced configuration,
// whose partitioner reuses the HARP pipeline and whose memory traffic goes through
// stream buffers of the same kind. The two share no signals; each keeps its own
// ports, prefixed h_ for the partitioning system and q_ for the Q100. The processor
// core, its caches and main memory are not part of this design and sit outside
// these ports. All parameters are the defaults of the two blocks and are fixed
// here.
//
// Interface and timing are those of harp_system and q100; see their headers.
module asd_top #(
  localparam int unsigned H_N_SPLIT = harp_pkg::N_SPLITTERS,
  localparam int unsigned H_REC_W = harp_pkg::REC_W,
  localparam int unsigned H_KEY_W = harp_pkg::KEY_W,
  localparam int unsigned H_RECS = harp_pkg::RECS_PER_BURST,
  localparam int unsigned H_PB_DEPTH = harp_pkg::PB_DEPTH,
  localparam int unsigned H_SBIN_DEP = harp_pkg::SB_IN_DEPTH,
  localparam int unsigned H_SBOUT_DEP = 2 * H_N_SPLIT + 1,
  localparam int unsigned H_RB_ENTRIES = 16,
  localparam int unsigned H_ADDR_W = 48,
  localparam int unsigned H_NP = 2 * H_N_SPLIT + 1,
  localparam int unsigned H_SW = (H_N_SPLIT > 1) ? $clog2(H_N_SPLIT) : 1,
  localparam int unsigned H_PW = (H_NP > 1) ? $clog2(H_NP) : 1,
  localparam int unsigned H_NW = $clog2(H_RECS + 1),
  localparam int unsigned H_BW = H_RECS * H_REC_W,
  localparam int unsigned H_TW = (H_RB_ENTRIES > 1) ? $clog2(H_RB_ENTRIES) : 1,
  localparam int unsigned Q_N_AGG = q100_pkg::N_AGG,
  localparam int unsigned Q_N_ALU = q100_pkg::N_ALU,
  localparam int unsigned Q_N_BOOL = q100_pkg::N_BOOL,
  localparam int unsigned Q_N_CFILT = q100_pkg::N_CFILT,
  localparam int unsigned Q_N_JOIN = q100_pkg::N_JOIN,
  localparam int unsigned Q_N_PART = q100_pkg::N_PART,
  localparam int unsigned Q_N_SORT = q100_pkg::N_SORT,
  localparam int unsigned Q_N_APP = q100_pkg::N_APP,
  localparam int unsigned Q_N_CSEL = q100_pkg::N_CSEL,
  localparam int unsigned Q_N_CAT = q100_pkg::N_CAT,
  localparam int unsigned Q_N_STCH = q100_pkg::N_STCH,
  localparam int unsigned Q_N_SBIN = q100_pkg::N_SBIN,
  localparam int unsigned Q_N_SBOUT = q100_pkg::N_SBOUT,
  localparam int unsigned Q_SORT_N = q100_pkg::SORT_N,
  localparam int unsigned Q_PART_SPLIT = q100_pkg::PART_SPLIT,
  localparam int unsigned Q_SB_DEPTH = 16,
  localparam int unsigned Q_REC_W = q100_pkg::REC_W,
  localparam int unsigned Q_COL_W = q100_pkg::COL_W,
  localparam int unsigned Q_KEY_W = q100_pkg::KEY_W,
  localparam int unsigned Q_ALU_W = q100_pkg::ALU_W,
  localparam int unsigned Q_SIN = q100_pkg::STITCH_IN,
  localparam int unsigned Q_TAGW = 8,
  localparam int unsigned Q_WW = Q_REC_W + Q_TAGW + 1,
  localparam int unsigned Q_NSRC = Q_N_SBIN + Q_N_AGG + Q_N_ALU + Q_N_BOOL + Q_N_CFILT + Q_N_JOIN + Q_N_PART + Q_N_SORT + Q_N_APP + Q_N_CSEL + Q_N_CAT + Q_N_STCH,
  localparam int unsigned Q_NSNK = 2*Q_N_AGG + 2*Q_N_ALU + 2*Q_N_BOOL + 2*Q_N_CFILT + 2*Q_N_JOIN + Q_N_PART + Q_N_SORT + 2*Q_N_APP + Q_N_CSEL + 2*Q_N_CAT + Q_SIN*Q_N_STCH + Q_N_SBOUT,
  localparam int unsigned Q_SELW = $clog2(Q_NSRC),
  localparam int unsigned Q_PSW = (Q_PART_SPLIT > 1) ? $clog2(Q_PART_SPLIT) : 1,
  localparam int unsigned Q_CBW = $clog2(Q_COL_W / 8 + 1),
  localparam int unsigned Q_ROW = $clog2(Q_REC_W / 8)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic h_spl_we,
  input  logic [H_SW-1:0] h_spl_idx,
  input  logic [H_KEY_W-1:0] h_spl_val,
  input  logic h_partition_start,
  input  logic h_partition_stop,
  output logic h_harp_running,
  output logic h_harp_done,
  input  logic h_req_valid,
  output logic h_req_ready,
  input  logic [H_ADDR_W-1:0] h_req_addr,
  input  logic h_req_prefetch,
  input  logic h_req_stream,
  output logic h_mem_req_valid,
  output logic [H_ADDR_W-1:0] h_mem_req_addr,
  output logic [H_TW-1:0] h_mem_req_tag,
  input  logic h_fill_valid,
  output logic h_fill_ready,
  input  logic [H_TW-1:0] h_fill_tag,
  input  logic [H_BW-1:0] h_fill_data,
  output logic h_llc_valid,
  output logic [H_ADDR_W-1:0] h_llc_addr,
  output logic h_llc_prefetch,
  output logic [H_BW-1:0] h_llc_data,
  input  logic h_sbst_valid,
  output logic h_sbst_ready,
  input  logic [H_ADDR_W-1:0] h_sbst_addr,
  output logic h_st_valid,
  output logic [H_ADDR_W-1:0] h_st_addr,
  output logic [H_BW-1:0] h_st_data,
  output logic [H_PW-1:0] h_st_part,
  output logic [H_NW-1:0] h_st_nrec,
  input  logic h_ctx_hold,
  input  logic h_ctx_sel,
  output logic h_save_valid,
  input  logic h_save_ready,
  output logic [H_BW+H_PW+H_NW-1:0] h_save_data,
  input  logic h_restore_valid,
  output logic h_restore_ready,
  input  logic [H_BW+H_PW+H_NW-1:0] h_restore_data,
  output logic [$clog2(H_SBIN_DEP+1)-1:0] h_sbin_count,
  output logic [$clog2(H_SBOUT_DEP+1)-1:0] h_sbout_count,
  output logic h_conv_stall,
  output logic h_merge_b2b,
  input  logic [Q_SELW-1:0] q_sink_sel [Q_NSNK],
  input  logic [Q_NSNK-1:0] q_sink_en,
  input  q100_pkg::agg_op_e q_agg_op [Q_N_AGG],
  input  q100_pkg::alu_op_e q_alu_op [Q_N_ALU],
  input  logic [Q_N_ALU-1:0] q_alu_use_const,
  input  logic [Q_ALU_W-1:0] q_alu_const [Q_N_ALU],
  input  q100_pkg::cmp_op_e q_bool_op [Q_N_BOOL],
  input  logic [Q_N_BOOL-1:0] q_bool_use_const,
  input  logic [Q_COL_W-1:0] q_bool_const [Q_N_BOOL],
  input  logic [Q_N_PART-1:0] q_part_spl_we,
  input  logic [Q_PSW-1:0] q_part_spl_idx [Q_N_PART],
  input  logic [Q_KEY_W-1:0] q_part_spl_val [Q_N_PART],
  input  logic [Q_ROW-1:0] q_csel_offset [Q_N_CSEL],
  input  logic [Q_CBW-1:0] q_csel_bytes [Q_N_CSEL],
  input  logic [Q_CBW-1:0] q_cat_b_bytes [Q_N_CAT],
  input  logic [Q_CBW-1:0] q_stitch_bytes [Q_N_STCH][Q_SIN],
  input  logic [Q_N_SBIN-1:0] q_sbin_valid,
  output logic [Q_N_SBIN-1:0] q_sbin_ready,
  input  logic [Q_REC_W-1:0] q_sbin_data [Q_N_SBIN],
  input  logic [Q_N_SBIN-1:0] q_sbin_eos,
  output logic [Q_N_SBOUT-1:0] q_sbout_valid,
  input  logic [Q_N_SBOUT-1:0] q_sbout_ready,
  output logic [Q_REC_W-1:0] q_sbout_data [Q_N_SBOUT],
  output logic [Q_TAGW-1:0] q_sbout_tag [Q_N_SBOUT],
  output logic [Q_N_SBOUT-1:0] q_sbout_eos,
  output logic [Q_N_SORT-1:0] q_sort_overflow,
  output logic [Q_N_SORT-1:0] q_sort_busy,
  output logic [Q_N_PART-1:0] q_part_stall,
  output logic [Q_N_PART-1:0] q_part_b2b
);

  harp_system u_harp_system (
    .clk,
    .rst_n,
    .spl_we (h_spl_we),
    .spl_idx (h_spl_idx),
    .spl_val (h_spl_val),
    .partition_start (h_partition_start),
    .partition_stop (h_partition_stop),
    .harp_running (h_harp_running),
    .harp_done (h_harp_done),
    .req_valid (h_req_valid),
    .req_ready (h_req_ready),
    .req_addr (h_req_addr),
    .req_prefetch (h_req_prefetch),
    .req_stream (h_req_stream),
    .mem_req_valid (h_mem_req_valid),
    .mem_req_addr (h_mem_req_addr),
    .mem_req_tag (h_mem_req_tag),
    .fill_valid (h_fill_valid),
    .fill_ready (h_fill_ready),
    .fill_tag (h_fill_tag),
    .fill_data (h_fill_data),
    .llc_valid (h_llc_valid),
    .llc_addr (h_llc_addr),
    .llc_prefetch (h_llc_prefetch),
    .llc_data (h_llc_data),
    .sbst_valid (h_sbst_valid),
    .sbst_ready (h_sbst_ready),
    .sbst_addr (h_sbst_addr),
    .st_valid (h_st_valid),
    .st_addr (h_st_addr),
    .st_data (h_st_data),
    .st_part (h_st_part),
    .st_nrec (h_st_nrec),
    .ctx_hold (h_ctx_hold),
    .ctx_sel (h_ctx_sel),
    .save_valid (h_save_valid),
    .save_ready (h_save_ready),
    .save_data (h_save_data),
    .restore_valid (h_restore_valid),
    .restore_ready (h_restore_ready),
    .restore_data (h_restore_data),
    .sbin_count (h_sbin_count),
    .sbout_count (h_sbout_count),
    .conv_stall (h_conv_stall),
    .merge_b2b (h_merge_b2b)
  );

  q100 u_q100 (
    .clk,
    .rst_n,
    .sink_sel (q_sink_sel),
    .sink_en (q_sink_en),
    .agg_op (q_agg_op),
    .alu_op (q_alu_op),
    .alu_use_const (q_alu_use_const),
    .alu_const (q_alu_const),
    .bool_op (q_bool_op),
    .bool_use_const (q_bool_use_const),
    .bool_const (q_bool_const),
    .part_spl_we (q_part_spl_we),
    .part_spl_idx (q_part_spl_idx),
    .part_spl_val (q_part_spl_val),
    .csel_offset (q_csel_offset),
    .csel_bytes (q_csel_bytes),
    .cat_b_bytes (q_cat_b_bytes),
    .stitch_bytes (q_stitch_bytes),
    .sbin_valid (q_sbin_valid),
    .sbin_ready (q_sbin_ready),
    .sbin_data (q_sbin_data),
    .sbin_eos (q_sbin_eos),
    .sbout_valid (q_sbout_valid),
    .sbout_ready (q_sbout_ready),
    .sbout_data (q_sbout_data),
    .sbout_tag (q_sbout_tag),
    .sbout_eos (q_sbout_eos),
    .sort_overflow (q_sort_overflow),
    .sort_busy (q_sort_busy),
    .part_stall (q_part_stall),
    .part_b2b (q_part_b2b)
  );
endmodule
