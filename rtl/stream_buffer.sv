// stream_buffer: an architecturally visible stream buffer between memory and a
// streaming accelerator (SB_in or SB_out of the streaming framework).
//
// The buffer is a first-in first-out queue of WIDTH-bit entries (a 64-byte burst,
// plus a tag for the outbound buffer). Software fills an inbound buffer with
// sbload and empties an outbound buffer with sbstore; the full/empty state blocks
// those instructions until there is room or data (ready low). The accelerator
// pops an inbound buffer and pushes an outbound one.
//
// For interrupts and context switches the document has software save and restore
// the buffers (sbsave, sbrestore) after the accelerator has drained. Here ctx_hold
// shuts the accelerator side off; then the memory side may pop entries in queue
// order (sbsave) and push them back in the same order (sbrestore), which leaves
// the buffer exactly as it was. Modelling save as a pop and restore as a push is
// this design's own choice.
//
// Interface: mem_push_* (sbload, sbrestore), mem_pop_* (sbstore, sbsave),
// acc_push_* and acc_pop_* for the accelerator; count of entries. INBOUND selects
// which side feeds the buffer in normal operation: an inbound buffer accepts
// mem_push always and mem_pop only under ctx_hold, an outbound buffer the reverse.
// Timing: an entry pushed in one cycle can be popped the next.
module stream_buffer #(
  parameter int unsigned WIDTH   = harp_pkg::BURST_W,
  parameter int unsigned DEPTH   = harp_pkg::SB_IN_DEPTH,
  parameter bit          INBOUND = 1'b1,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW     = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ctx_hold,
  input  logic             mem_push_valid,
  output logic             mem_push_ready,
  input  logic [WIDTH-1:0] mem_push_data,
  output logic             mem_pop_valid,
  input  logic             mem_pop_ready,
  output logic [WIDTH-1:0] mem_pop_data,
  input  logic             acc_push_valid,
  output logic             acc_push_ready,
  input  logic [WIDTH-1:0] acc_push_data,
  output logic             acc_pop_valid,
  input  logic             acc_pop_ready,
  output logic [WIDTH-1:0] acc_pop_data,
  output logic [CW-1:0]    count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             full, empty;
  logic             mem_push_en, mem_pop_en, acc_push_en, acc_pop_en;
  logic             push, pop;
  logic [WIDTH-1:0] push_data;

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);

  // Which port of each side is live.
  assign mem_push_en = INBOUND ? 1'b1 : ctx_hold;
  assign mem_pop_en  = INBOUND ? ctx_hold : 1'b1;
  assign acc_push_en = !INBOUND && !ctx_hold;
  assign acc_pop_en  = INBOUND && !ctx_hold;

  assign mem_push_ready = mem_push_en && !full;
  assign acc_push_ready = acc_push_en && !full && !(mem_push_valid && mem_push_en);
  assign mem_pop_valid  = mem_pop_en && !empty;
  assign acc_pop_valid  = acc_pop_en && !empty;
  assign mem_pop_data   = mem[rp];
  assign acc_pop_data   = mem[rp];

  assign push      = (mem_push_valid && mem_push_ready) || (acc_push_valid && acc_push_ready);
  assign push_data = (mem_push_valid && mem_push_ready) ? mem_push_data : acc_push_data;
  assign pop       = (mem_pop_valid && mem_pop_ready) || (acc_pop_valid && acc_pop_ready);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + CW'(push) - CW'(pop);
    end
  end
endmodule
