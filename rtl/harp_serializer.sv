// harp_serializer: turns a stream of bursts into a stream of records.
//
// A burst of RECS records (record 0 in the least significant bits) is taken from
// the inbound stream buffer and its records are handed on one per cycle. On the
// cycle the last record of a burst leaves, the next burst is accepted, so a steady
// input keeps the output busy every cycle (the document's "as soon as one burst has
// been fed into the pipe, the serializer is ready to pull the subsequent burst").
// The document calls this a simple state machine; the register-and-index form here
// is this design's own.
//
// Interface: in_valid/in_ready handshake for bursts; pull_en gates only the taking
// of new bursts, so a burst already taken is always emitted in full. out_valid
// marks a record; stall (from the conveyor) holds the current record.
// Timing: a record leaves the cycle after its burst is accepted.
module harp_serializer #(
  parameter int unsigned REC_W = harp_pkg::REC_W,
  parameter int unsigned RECS  = harp_pkg::RECS_PER_BURST
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pull_en,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [RECS*REC_W-1:0] in_burst,
  input  logic                  stall,
  output logic                  out_valid,
  output logic [REC_W-1:0]      out_rec,
  output logic                  busy
);
  localparam int unsigned IW = (RECS > 1) ? $clog2(RECS) : 1;

  logic [RECS*REC_W-1:0] burst_q;
  logic                  full_q;
  logic [IW-1:0]         idx_q;
  logic                  last;

  assign last      = (idx_q == IW'(RECS - 1));
  assign in_ready  = pull_en && (!full_q || (!stall && last));
  assign out_valid = full_q;
  assign out_rec   = burst_q[idx_q*REC_W +: REC_W];
  assign busy      = full_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q  <= 1'b0;
      idx_q   <= '0;
      burst_q <= '0;
    end else begin
      if (in_valid && in_ready) begin
        burst_q <= in_burst;
        full_q  <= 1'b1;
        idx_q   <= '0;
      end else if (full_q && !stall) begin
        if (last) begin
          full_q <= 1'b0;
          idx_q  <= '0;
        end else begin
          idx_q <= idx_q + 1'b1;
        end
      end
    end
  end
endmodule
