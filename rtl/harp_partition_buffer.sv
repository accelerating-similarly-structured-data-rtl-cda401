// harp_partition_buffer: the record buffer of one HARP partition.
//
// A first-in first-out store of DEPTH records. The conveyor writes the records
// filed into this partition; the merge unit reads them out one per cycle once a
// burst has collected. The document states only that there is one buffer per
// partition that holds records until a burst is ready; the FIFO form and the
// default depth of two bursts are this design's own.
//
// Interface: we/wdata write, rd read (head in rdata, valid the same cycle while
// not empty), count of stored records, full. A write and a read may happen in the
// same cycle; full is count == DEPTH, so a write is only offered when not full.
module harp_partition_buffer #(
  parameter int unsigned REC_W = harp_pkg::REC_W,
  parameter int unsigned DEPTH = harp_pkg::PB_DEPTH,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [REC_W-1:0] wdata,
  input  logic             rd,
  output logic [REC_W-1:0] rdata,
  output logic [CW-1:0]    count,
  output logic             full
);
  logic [REC_W-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  assign rdata = mem[rp];
  assign full  = (count == CW'(DEPTH));

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (we) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (we) wp <= inc(wp);
      if (rd) rp <= inc(rp);
      count <= count + CW'(we) - CW'(rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) we |-> (!full || rd));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd |-> (count != 0));
endmodule
