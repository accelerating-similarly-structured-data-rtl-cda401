// harp_system: the range partitioner with its software-controlled streaming
// framework, as attached to one processor core (document Fig 5.1).
//
// Two stream buffers decouple the accelerator from the memory system: SB_in runs
// from memory to HARP and SB_out from HARP to memory. Software moves data between
// memory and the buffers with stream instructions, while HARP pulls from SB_in and
// pushes to SB_out on its own. Stream loads travel the core's ordinary load
// request path; the request buffer's stream bit routes their fills to SB_in
// instead of the last level cache (document Fig 5.3).
//
// Instruction ports:
//   core requests (req_*): ordinary loads and prefetches, and sbload (req_stream=1).
//   sbstore (sbst_*): takes the head of SB_out and presents it with the given
//     address on st_*; its partition number and record count come along, which is
//     how software learns where each burst belongs (this design's own choice).
//   sbsave / sbrestore (ctx_*): with ctx_hold high, ctx_sel picks the buffer
//     (0 = SB_in, 1 = SB_out); save_* pops it in order, restore_* pushes entries
//     back. The document requires HARP to be stopped and drained first.
//   set_splitter, partition_start, partition_stop go straight to HARP.
// Memory side: mem_req_* out, fill_* in; llc_* carries non-stream fills.
// The document's 64-byte burst is the stream buffer entry; it also mentions
// vector-sized (128 or 256 byte) stream transfers, which this design does not use.
module harp_system #(
  parameter int unsigned N_SPLIT   = harp_pkg::N_SPLITTERS,
  parameter int unsigned REC_W     = harp_pkg::REC_W,
  parameter int unsigned KEY_W     = harp_pkg::KEY_W,
  parameter int unsigned RECS      = harp_pkg::RECS_PER_BURST,
  parameter int unsigned PB_DEPTH  = harp_pkg::PB_DEPTH,
  parameter int unsigned SBIN_DEP  = harp_pkg::SB_IN_DEPTH,
  parameter int unsigned SBOUT_DEP = 2 * N_SPLIT + 1,
  parameter int unsigned RB_ENTRIES = 16,
  parameter int unsigned ADDR_W    = 48,
  localparam int unsigned NP       = 2 * N_SPLIT + 1,
  localparam int unsigned SW       = (N_SPLIT > 1) ? $clog2(N_SPLIT) : 1,
  localparam int unsigned PW       = (NP > 1) ? $clog2(NP) : 1,
  localparam int unsigned NW       = $clog2(RECS + 1),
  localparam int unsigned BW       = RECS * REC_W,
  localparam int unsigned TW       = (RB_ENTRIES > 1) ? $clog2(RB_ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // HARP instructions
  input  logic              spl_we,
  input  logic [SW-1:0]     spl_idx,
  input  logic [KEY_W-1:0]  spl_val,
  input  logic              partition_start,
  input  logic              partition_stop,
  output logic              harp_running,
  output logic              harp_done,
  // core load requests, including sbload
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic              req_prefetch,
  input  logic              req_stream,
  output logic              mem_req_valid,
  output logic [ADDR_W-1:0] mem_req_addr,
  output logic [TW-1:0]     mem_req_tag,
  input  logic              fill_valid,
  output logic              fill_ready,
  input  logic [TW-1:0]     fill_tag,
  input  logic [BW-1:0]     fill_data,
  output logic              llc_valid,
  output logic [ADDR_W-1:0] llc_addr,
  output logic              llc_prefetch,
  output logic [BW-1:0]     llc_data,
  // sbstore
  input  logic              sbst_valid,
  output logic              sbst_ready,
  input  logic [ADDR_W-1:0] sbst_addr,
  output logic              st_valid,
  output logic [ADDR_W-1:0] st_addr,
  output logic [BW-1:0]     st_data,
  output logic [PW-1:0]     st_part,
  output logic [NW-1:0]     st_nrec,
  // sbsave / sbrestore
  input  logic              ctx_hold,
  input  logic              ctx_sel,
  output logic              save_valid,
  input  logic              save_ready,
  output logic [BW+PW+NW-1:0] save_data,
  input  logic              restore_valid,
  output logic              restore_ready,
  input  logic [BW+PW+NW-1:0] restore_data,
  // status and events
  output logic [$clog2(SBIN_DEP+1)-1:0]  sbin_count,
  output logic [$clog2(SBOUT_DEP+1)-1:0] sbout_count,
  output logic              conv_stall,
  output logic              merge_b2b
);
  localparam int unsigned OW = BW + PW + NW;

  logic          sbf_valid, sbf_ready;
  logic [BW-1:0] sbf_data;
  logic          in_valid, in_ready;
  logic [BW-1:0] in_burst;
  logic          out_valid, out_ready;
  logic [BW-1:0] out_burst;
  logic [PW-1:0] out_part;
  logic [NW-1:0] out_nrec;

  llc_fill_router #(.ENTRIES(RB_ENTRIES), .ADDR_W(ADDR_W), .DATA_W(BW)) u_router (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_addr, .req_prefetch, .req_stream,
    .mem_req_valid, .mem_req_addr, .mem_req_tag,
    .fill_valid, .fill_ready, .fill_tag, .fill_data,
    .sb_valid (sbf_valid),
    .sb_ready (sbf_ready),
    .sb_data  (sbf_data),
    .llc_valid, .llc_addr, .llc_prefetch, .llc_data
  );

  // SB_in: memory side takes stream fills, or restore data under ctx_hold.
  logic          in_mpush_v, in_mpush_r, in_mpop_v;
  logic [BW-1:0] in_mpush_d, in_mpop_d;
  logic          in_restore;
  assign in_restore = ctx_hold && !ctx_sel;
  assign in_mpush_v = in_restore ? restore_valid : sbf_valid;
  assign in_mpush_d = in_restore ? restore_data[BW-1:0] : sbf_data;
  assign sbf_ready  = !in_restore && in_mpush_r;

  stream_buffer #(.WIDTH(BW), .DEPTH(SBIN_DEP), .INBOUND(1'b1)) u_sbin (
    .clk, .rst_n, .ctx_hold,
    .mem_push_valid (in_mpush_v),
    .mem_push_ready (in_mpush_r),
    .mem_push_data  (in_mpush_d),
    .mem_pop_valid  (in_mpop_v),
    .mem_pop_ready  (save_ready && !ctx_sel),
    .mem_pop_data   (in_mpop_d),
    .acc_push_valid (1'b0),
    .acc_push_ready (),
    .acc_push_data  ('0),
    .acc_pop_valid  (in_valid),
    .acc_pop_ready  (in_ready),
    .acc_pop_data   (in_burst),
    .count          (sbin_count)
  );

  harp #(.N_SPLIT(N_SPLIT), .REC_W(REC_W), .KEY_W(KEY_W), .RECS(RECS), .PB_DEPTH(PB_DEPTH)) u_harp (
    .clk, .rst_n,
    .spl_we, .spl_idx, .spl_val,
    .partition_start, .partition_stop,
    .running (harp_running),
    .done    (harp_done),
    .in_valid, .in_ready, .in_burst,
    .out_valid, .out_ready, .out_burst, .out_part, .out_nrec,
    .conv_stall, .merge_b2b
  );

  // SB_out: memory side serves sbstore, or save/restore under ctx_hold.
  logic          out_mpop_v, out_mpop_r, out_mpush_r;
  logic [OW-1:0] out_mpop_d;
  logic          out_ctx;
  assign out_ctx    = ctx_hold && ctx_sel;
  assign out_mpop_r = out_ctx ? save_ready : sbst_valid;

  stream_buffer #(.WIDTH(OW), .DEPTH(SBOUT_DEP), .INBOUND(1'b0)) u_sbout (
    .clk, .rst_n, .ctx_hold,
    .mem_push_valid (out_ctx && restore_valid),
    .mem_push_ready (out_mpush_r),
    .mem_push_data  (restore_data),
    .mem_pop_valid  (out_mpop_v),
    .mem_pop_ready  (out_mpop_r),
    .mem_pop_data   (out_mpop_d),
    .acc_push_valid (out_valid),
    .acc_push_ready (out_ready),
    .acc_push_data  ({out_nrec, out_part, out_burst}),
    .acc_pop_valid  (),
    .acc_pop_ready  (1'b0),
    .acc_pop_data   (),
    .count          (sbout_count)
  );

  assign sbst_ready = !out_ctx && out_mpop_v;
  assign st_valid   = sbst_valid && sbst_ready;
  assign st_addr    = sbst_addr;
  assign st_data    = out_mpop_d[BW-1:0];
  assign st_part    = out_mpop_d[BW +: PW];
  assign st_nrec    = out_mpop_d[BW+PW +: NW];

  assign save_valid    = ctx_hold && (ctx_sel ? out_mpop_v : in_mpop_v);
  assign save_data     = ctx_sel ? out_mpop_d : {{(PW+NW){1'b0}}, in_mpop_d};
  assign restore_ready = ctx_hold && (ctx_sel ? out_mpush_r : in_mpush_r);
endmodule
