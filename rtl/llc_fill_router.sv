// llc_fill_router: the last-level-cache request buffer extended for stream loads.
//
// Stream loads (sbload) reuse the ordinary load request path. Each entry of the
// request buffer holds the address, a demand/prefetch bit and the new
// cache/stream bit (document Fig 5.3). When memory returns the data of a request,
// the stream bit of its entry steers the fill: stream fills go over a dedicated
// bus to the inbound stream buffer and are not cached, all other fills go to the
// last level cache. The entry is then freed.
//
// The document gives the extra bit and the fill multiplexer; the buffer size, the
// free-entry allocation (lowest free entry first) and the handshakes are this
// design's own. Checking the caches for a hit and merging with outstanding
// requests, which the document also describes for sbload, belong to the existing
// cache and are not modelled.
//
// Interface: req_* allocates an entry and issues the memory request (mem_req_*,
// carrying the entry number as tag) in the same cycle; fill_* returns data with
// its tag; sb_* and llc_* are the two fill destinations. A stream fill waits
// (fill_ready low) while the stream buffer is full.
module llc_fill_router #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned ADDR_W  = 48,
  parameter int unsigned DATA_W  = harp_pkg::BURST_W,
  localparam int unsigned IW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // requests from the core
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic              req_prefetch,
  input  logic              req_stream,
  // to memory
  output logic              mem_req_valid,
  output logic [ADDR_W-1:0] mem_req_addr,
  output logic [IW-1:0]     mem_req_tag,
  // fills from memory
  input  logic              fill_valid,
  output logic              fill_ready,
  input  logic [IW-1:0]     fill_tag,
  input  logic [DATA_W-1:0] fill_data,
  // fill destinations
  output logic              sb_valid,
  input  logic              sb_ready,
  output logic [DATA_W-1:0] sb_data,
  output logic              llc_valid,
  output logic [ADDR_W-1:0] llc_addr,
  output logic              llc_prefetch,
  output logic [DATA_W-1:0] llc_data
);
  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] addr;
    logic              prefetch;   // D/P
    logic              stream;     // C/S
  } rb_entry_t;

  rb_entry_t     rb [ENTRIES];
  logic          have_free;
  logic [IW-1:0] free_idx;
  rb_entry_t     hit;

  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!rb[i].valid) begin
        have_free = 1'b1;
        free_idx  = IW'(i);
      end
    end
  end

  assign req_ready     = have_free;
  assign mem_req_valid = req_valid && have_free;
  assign mem_req_addr  = req_addr;
  assign mem_req_tag   = free_idx;

  // The stream bit is the select of the fill multiplexer.
  assign hit          = rb[fill_tag];
  assign fill_ready   = hit.stream ? sb_ready : 1'b1;
  assign sb_valid     = fill_valid && hit.valid && hit.stream;
  assign sb_data      = fill_data;
  assign llc_valid    = fill_valid && hit.valid && !hit.stream;
  assign llc_addr     = hit.addr;
  assign llc_prefetch = hit.prefetch;
  assign llc_data     = fill_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) rb[i] <= '0;
    end else begin
      if (fill_valid && fill_ready) rb[fill_tag].valid <= 1'b0;
      if (req_valid && have_free) begin
        rb[free_idx].valid    <= 1'b1;
        rb[free_idx].addr     <= req_addr;
        rb[free_idx].prefetch <= req_prefetch;
        rb[free_idx].stream   <= req_stream;
      end
    end
  end

  a_fill_known: assert property (@(posedge clk) disable iff (!rst_n) fill_valid |-> hit.valid);
endmodule
