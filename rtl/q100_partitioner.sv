// q100_partitioner: the Q100 range partitioner tile.
//
// The document builds the Q100 partitioner as the range partitioner of its earlier
// accelerator (HARP), widened to Q100 records and keys. This tile wraps that core
// for record streams: a record enters per cycle, passes the conveyor of splitter
// comparisons and leaves tagged with its partition number, records of the same
// partition in input order. Here a "burst" is a single record, since the Q100
// moves records rather than memory bursts (own choice), so the merge unit sends
// the fullest partition buffer one record at a time; back-to-back records of the
// same partition cost one extra cycle each.
//
// The tile starts the core on the first record and, on the end beat, stops it and
// waits until every record has left before sending its own end beat (own
// sequencing). Splitters are written beforehand through spl_*, ascending; with
// N_SPLIT splitters there are 2*N_SPLIT+1 partitions (below, equal to, and above
// each splitter).
//
// Interface: stream a (records), stream y (records with y_part), splitter port.
module q100_partitioner #(
  parameter int unsigned N_SPLIT  = q100_pkg::PART_SPLIT,
  parameter int unsigned REC_W    = q100_pkg::REC_W,
  parameter int unsigned KEY_W    = q100_pkg::KEY_W,
  parameter int unsigned PB_DEPTH = 2,
  localparam int unsigned NP      = 2 * N_SPLIT + 1,
  localparam int unsigned SW      = (N_SPLIT > 1) ? $clog2(N_SPLIT) : 1,
  localparam int unsigned PW      = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             spl_we,
  input  logic [SW-1:0]    spl_idx,
  input  logic [KEY_W-1:0] spl_val,
  input  logic             a_valid,
  output logic             a_ready,
  input  logic [REC_W-1:0] a_data,
  input  logic             a_eos,
  output logic             y_valid,
  input  logic             y_ready,
  output logic [REC_W-1:0] y_data,
  output logic [PW-1:0]    y_part,
  output logic             y_eos,
  output logic             conv_stall,
  output logic             merge_b2b
);
  typedef enum logic [1:0] {P_IDLE, P_RUN, P_DRAIN, P_EOS} pstate_e;

  pstate_e state_q;
  logic    running, done, start, stop;
  logic    in_ready, out_valid;
  logic    nrec;

  assign start = (state_q == P_IDLE) && a_valid;
  assign stop  = (state_q == P_RUN) && a_valid && a_eos;

  harp #(.N_SPLIT(N_SPLIT), .REC_W(REC_W), .KEY_W(KEY_W), .RECS(1), .PB_DEPTH(PB_DEPTH)) u_core (
    .clk, .rst_n,
    .spl_we, .spl_idx, .spl_val,
    .partition_start (start),
    .partition_stop  (stop),
    .running,
    .done,
    .in_valid  ((state_q == P_RUN) && a_valid && !a_eos),
    .in_ready,
    .in_burst  (a_data),
    .out_valid,
    .out_ready (y_ready && state_q != P_EOS),
    .out_burst (y_data),
    .out_part  (y_part),
    .out_nrec  (nrec),
    .conv_stall,
    .merge_b2b
  );

  assign a_ready = (state_q == P_RUN) && (a_eos || in_ready);
  assign y_valid = (state_q == P_EOS) || out_valid;
  assign y_eos   = (state_q == P_EOS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= P_IDLE;
    else begin
      unique case (state_q)
        P_IDLE:  if (start) state_q <= P_RUN;
        P_RUN:   if (stop)  state_q <= P_DRAIN;
        P_DRAIN: if (done)  state_q <= P_EOS;
        P_EOS:   if (y_ready) state_q <= P_IDLE;
        default: state_q <= P_IDLE;
      endcase
    end
  end
endmodule
