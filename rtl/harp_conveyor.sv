// harp_conveyor: the linear pipeline of splitter comparisons at the heart of HARP.
//
// There is one pipeline stage per splitter. The record in stage i has its key
// compared with splitter i: a key below the splitter is filed into partition 2i,
// a key equal to it into partition 2i+1, and a larger key moves on to stage i+1.
// A key larger than the last splitter is filed into partition 2*N_SPLIT. With
// splitters written in ascending order this is the equality range partitioning of
// the document's software reference (binary search returning 2*mid - (key==R[mid]))
// and gives 2*N_SPLIT+1 partitions, e.g. 255 for 127 splitters. Because each
// partition is fed from exactly one stage, records of a partition keep their input
// order.
//
// The document gives the stage structure (Fig 4.7); the handling of a full
// partition buffer is this design's own: if any stage would file a record into a
// full buffer, the whole pipeline and its input hold for that cycle (stall).
//
// Interface: set_splitter write port (spl_we, spl_idx, spl_val); in_valid/in_rec
// one record per cycle, held by stall; buf_we/buf_full per partition, with
// buf_rec carrying each stage's record (partitions 2i and 2i+1 share stage i's
// record). Keys are unsigned and sit at bits [KEY_LSB +: KEY_W] of a record.
// Timing: a record reaches stage i i cycles after it is accepted and is filed in
// the cycle it is compared.
module harp_conveyor #(
  parameter int unsigned N_SPLIT = harp_pkg::N_SPLITTERS,
  parameter int unsigned REC_W   = harp_pkg::REC_W,
  parameter int unsigned KEY_W   = harp_pkg::KEY_W,
  parameter int unsigned KEY_LSB = 0,
  localparam int unsigned NP     = 2 * N_SPLIT + 1,
  localparam int unsigned SW     = (N_SPLIT > 1) ? $clog2(N_SPLIT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             spl_we,
  input  logic [SW-1:0]    spl_idx,
  input  logic [KEY_W-1:0] spl_val,
  input  logic             in_valid,
  input  logic [REC_W-1:0] in_rec,
  output logic             stall,
  output logic             empty,
  output logic [NP-1:0]    buf_we,
  output logic [REC_W-1:0] stage_rec [N_SPLIT],
  input  logic [NP-1:0]    buf_full
);
  logic [KEY_W-1:0] splitter [N_SPLIT];
  logic             v_q      [N_SPLIT];
  logic [REC_W-1:0] rec_q    [N_SPLIT];
  logic [N_SPLIT-1:0] lt, eq, gt;

  always_comb begin
    for (int i = 0; i < N_SPLIT; i++) begin
      stage_rec[i] = rec_q[i];
      lt[i] = v_q[i] && (rec_q[i][KEY_LSB +: KEY_W] <  splitter[i]);
      eq[i] = v_q[i] && (rec_q[i][KEY_LSB +: KEY_W] == splitter[i]);
      gt[i] = v_q[i] && (rec_q[i][KEY_LSB +: KEY_W] >  splitter[i]);
    end
  end

  // A stage is blocked when the buffer it files into is full.
  always_comb begin
    stall = 1'b0;
    for (int i = 0; i < N_SPLIT; i++) begin
      if (lt[i] && buf_full[2*i])   stall = 1'b1;
      if (eq[i] && buf_full[2*i+1]) stall = 1'b1;
    end
    if (gt[N_SPLIT-1] && buf_full[NP-1]) stall = 1'b1;
  end

  always_comb begin
    buf_we = '0;
    if (!stall) begin
      for (int i = 0; i < N_SPLIT; i++) begin
        buf_we[2*i]   = lt[i];
        buf_we[2*i+1] = eq[i];
      end
      buf_we[NP-1] = gt[N_SPLIT-1];
    end
  end

  always_comb begin
    empty = 1'b1;
    for (int i = 0; i < N_SPLIT; i++) if (v_q[i]) empty = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_SPLIT; i++) begin
        splitter[i] <= '0;
        v_q[i]      <= 1'b0;
        rec_q[i]    <= '0;
      end
    end else begin
      if (spl_we) splitter[spl_idx] <= spl_val;
      if (!stall) begin
        v_q[0]   <= in_valid;
        rec_q[0] <= in_rec;
        for (int i = 1; i < N_SPLIT; i++) begin
          v_q[i]   <= gt[i-1];
          rec_q[i] <= rec_q[i-1];
        end
      end
    end
  end
endmodule
