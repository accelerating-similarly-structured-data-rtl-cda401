// harp: the hardware accelerated range partitioner.
//
// HARP takes a table as a stream of 64-byte bursts of records and writes it back
// as bursts that each belong to a single partition. Three units follow each other
// (document Fig 4.7): the serializer splits bursts into records, the conveyor
// compares each key with the splitters, one pipeline stage per splitter, and files
// the record into one partition buffer per partition, and the merge unit sends out
// a burst from the fullest buffer. In steady state one record enters and one
// leaves per cycle; records of a partition keep their input order.
//
// Control follows the document's three instructions: set_splitter (spl_we with
// splitter number and value; splitter numbers 0..N_SPLIT-1, values in ascending
// order), partition_start (start pulling bursts) and partition_stop (stop pulling,
// then drain every record in flight, the last burst of a partition possibly short).
// done pulses when the drain has finished. Control state and how draining is
// sequenced are this design's own.
//
// Interface: in_* burst handshake from the inbound stream buffer; out_* burst
// handshake to the outbound stream buffer, with the partition number and the count
// of valid records of each burst. Event outputs (conv_stall, merge_b2b) pulse when
// the conveyor holds for a full partition buffer and when the merge spends its
// extra cycle on a back-to-back burst to the same partition.
module harp #(
  parameter int unsigned N_SPLIT  = harp_pkg::N_SPLITTERS,
  parameter int unsigned REC_W    = harp_pkg::REC_W,
  parameter int unsigned KEY_W    = harp_pkg::KEY_W,
  parameter int unsigned KEY_LSB  = 0,
  parameter int unsigned RECS     = harp_pkg::RECS_PER_BURST,
  parameter int unsigned PB_DEPTH = harp_pkg::PB_DEPTH,
  localparam int unsigned NP      = 2 * N_SPLIT + 1,
  localparam int unsigned SW      = (N_SPLIT > 1) ? $clog2(N_SPLIT) : 1,
  localparam int unsigned PW      = (NP > 1) ? $clog2(NP) : 1,
  localparam int unsigned NW      = $clog2(RECS + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // instructions
  input  logic                  spl_we,
  input  logic [SW-1:0]         spl_idx,
  input  logic [KEY_W-1:0]      spl_val,
  input  logic                  partition_start,
  input  logic                  partition_stop,
  output logic                  running,
  output logic                  done,
  // inbound bursts
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [RECS*REC_W-1:0] in_burst,
  // outbound bursts
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [RECS*REC_W-1:0] out_burst,
  output logic [PW-1:0]         out_part,
  output logic [NW-1:0]         out_nrec,
  // events
  output logic                  conv_stall,
  output logic                  merge_b2b
);
  localparam int unsigned CW = $clog2(PB_DEPTH + 1);

  harp_pkg::harp_state_e state_q;

  logic             ser_valid, ser_busy, stall, conv_empty, merge_idle, flush;
  logic [REC_W-1:0] ser_rec;
  logic [NP-1:0]    buf_we, buf_full, buf_rd;
  logic [REC_W-1:0] stage_rec [N_SPLIT];
  logic [CW-1:0]    buf_count [NP];
  logic [REC_W-1:0] buf_head  [NP];
  logic             all_empty;

  harp_serializer #(.REC_W(REC_W), .RECS(RECS)) u_ser (
    .clk, .rst_n,
    .pull_en  (state_q == harp_pkg::HARP_RUN),
    .in_valid, .in_ready, .in_burst,
    .stall,
    .out_valid(ser_valid),
    .out_rec  (ser_rec),
    .busy     (ser_busy)
  );

  harp_conveyor #(.N_SPLIT(N_SPLIT), .REC_W(REC_W), .KEY_W(KEY_W), .KEY_LSB(KEY_LSB)) u_conv (
    .clk, .rst_n,
    .spl_we, .spl_idx, .spl_val,
    .in_valid (ser_valid),
    .in_rec   (ser_rec),
    .stall,
    .empty    (conv_empty),
    .buf_we,
    .stage_rec,
    .buf_full
  );

  for (genvar p = 0; p < NP; p++) begin : g_buf
    // Partitions 2i and 2i+1 are fed by stage i, the last one by the last stage.
    localparam int unsigned ST = (p == NP - 1) ? N_SPLIT - 1 : p / 2;
    harp_partition_buffer #(.REC_W(REC_W), .DEPTH(PB_DEPTH)) u_pb (
      .clk, .rst_n,
      .we    (buf_we[p]),
      .wdata (stage_rec[ST]),
      .rd    (buf_rd[p]),
      .rdata (buf_head[p]),
      .count (buf_count[p]),
      .full  (buf_full[p])
    );
  end

  always_comb begin
    all_empty = 1'b1;
    for (int p = 0; p < NP; p++) if (buf_count[p] != '0) all_empty = 1'b0;
  end

  assign flush = (state_q == harp_pkg::HARP_DRAIN) && !ser_busy && conv_empty;

  harp_merge #(.NP(NP), .REC_W(REC_W), .RECS(RECS), .DEPTH(PB_DEPTH)) u_merge (
    .clk, .rst_n,
    .flush,
    .count    (buf_count),
    .head     (buf_head),
    .rd       (buf_rd),
    .out_valid, .out_ready, .out_burst, .out_part, .out_nrec,
    .same_b2b (merge_b2b),
    .idle     (merge_idle)
  );

  assign conv_stall = stall;
  assign running    = (state_q != harp_pkg::HARP_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= harp_pkg::HARP_IDLE;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        harp_pkg::HARP_IDLE:  if (partition_start) state_q <= harp_pkg::HARP_RUN;
        harp_pkg::HARP_RUN:   if (partition_stop)  state_q <= harp_pkg::HARP_DRAIN;
        harp_pkg::HARP_DRAIN: if (flush && all_empty && merge_idle) begin
          state_q <= harp_pkg::HARP_IDLE;
          done    <= 1'b1;
        end
        default: state_q <= harp_pkg::HARP_IDLE;
      endcase
    end
  end
endmodule
