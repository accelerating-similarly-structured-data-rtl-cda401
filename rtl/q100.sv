// q100: the Q100 database processing unit, a collection of relational tiles.
//
// The Q100 runs a query as a graph of coarse-grained "spatial instructions", each
// executed by a dedicated tile: aggregator, ALU, boolean generator, column filter,
// joiner, partitioner and sorter, plus the helper tiles append, column select,
// concatenate and stitch. Columns and tables stream from tile to tile one element
// per cycle, so all tiles of a temporal instruction work as one pipeline; inbound
// stream buffers bring tables in from memory and outbound ones take results back.
// The tile mix defaults to the document's balanced (Pareto) configuration.
//
// One temporal instruction is the set of configuration inputs of this module,
// held steady while it runs: for every tile input and every outbound stream buffer
// a source (sink_sel, enabled by sink_en), and each tile's operation fields. The
// document assumes all-to-all communication and leaves the network-on-chip design
// open; this module uses the simplest all-to-all fabric, a multiplexer per tile
// input choosing any tile output or inbound stream buffer. A producer may feed
// several consumers: a beat leaves it when every consumer's two-entry input queue
// has room. This fabric is this design's own.
//
// Numbering. Sources: inbound stream buffers 0..N_SBIN-1, then the outputs of the
// aggregators, ALUs, boolean generators, column filters, joiners, partitioners,
// sorters, appenders, column selectors, concatenators and stitchers, in that order.
// Sinks: the inputs of the same tiles in the same order (two per two-input tile,
// in port order; STITCH_IN per stitcher), then the outbound stream buffers. The
// functions src_*/snk_* of q100_map give the numbers.
//
// Every stream word is {eos, tag, data}: data is REC_W bits (columns use the low
// COL_W bits, booleans bit 0, an aggregator emits {result, group} as a 2*COL_W-bit
// record), tag carries a partitioner's partition number to memory.
module q100 #(
  parameter int unsigned N_AGG   = q100_pkg::N_AGG,
  parameter int unsigned N_ALU   = q100_pkg::N_ALU,
  parameter int unsigned N_BOOL  = q100_pkg::N_BOOL,
  parameter int unsigned N_CFILT = q100_pkg::N_CFILT,
  parameter int unsigned N_JOIN  = q100_pkg::N_JOIN,
  parameter int unsigned N_PART  = q100_pkg::N_PART,
  parameter int unsigned N_SORT  = q100_pkg::N_SORT,
  parameter int unsigned N_APP   = q100_pkg::N_APP,
  parameter int unsigned N_CSEL  = q100_pkg::N_CSEL,
  parameter int unsigned N_CAT   = q100_pkg::N_CAT,
  parameter int unsigned N_STCH  = q100_pkg::N_STCH,
  parameter int unsigned N_SBIN  = q100_pkg::N_SBIN,
  parameter int unsigned N_SBOUT = q100_pkg::N_SBOUT,
  parameter int unsigned SORT_N  = q100_pkg::SORT_N,
  parameter int unsigned PART_SPLIT = q100_pkg::PART_SPLIT,
  parameter int unsigned SB_DEPTH = 16,
  localparam int unsigned REC_W  = q100_pkg::REC_W,
  localparam int unsigned COL_W  = q100_pkg::COL_W,
  localparam int unsigned KEY_W  = q100_pkg::KEY_W,
  localparam int unsigned ALU_W  = q100_pkg::ALU_W,
  localparam int unsigned SIN    = q100_pkg::STITCH_IN,
  localparam int unsigned TAGW   = 8,
  localparam int unsigned WW     = REC_W + TAGW + 1,
  localparam int unsigned NSRC   = N_SBIN + N_AGG + N_ALU + N_BOOL + N_CFILT + N_JOIN + N_PART + N_SORT + N_APP + N_CSEL + N_CAT + N_STCH,
  localparam int unsigned NSNK   = 2*N_AGG + 2*N_ALU + 2*N_BOOL + 2*N_CFILT + 2*N_JOIN + N_PART + N_SORT + 2*N_APP + N_CSEL + 2*N_CAT + SIN*N_STCH + N_SBOUT,
  localparam int unsigned SELW   = $clog2(NSRC),
  localparam int unsigned PSW    = (PART_SPLIT > 1) ? $clog2(PART_SPLIT) : 1,
  localparam int unsigned CBW    = $clog2(COL_W / 8 + 1),
  localparam int unsigned ROW    = $clog2(REC_W / 8)
) (
  input  logic              clk,
  input  logic              rst_n,
  // interconnect configuration
  input  logic [SELW-1:0]   sink_sel [NSNK],
  input  logic [NSNK-1:0]   sink_en,
  // tile configuration
  input  q100_pkg::agg_op_e agg_op        [N_AGG],
  input  q100_pkg::alu_op_e alu_op        [N_ALU],
  input  logic [N_ALU-1:0]  alu_use_const,
  input  logic [ALU_W-1:0]  alu_const     [N_ALU],
  input  q100_pkg::cmp_op_e bool_op       [N_BOOL],
  input  logic [N_BOOL-1:0] bool_use_const,
  input  logic [COL_W-1:0]  bool_const    [N_BOOL],
  input  logic [N_PART-1:0] part_spl_we,
  input  logic [PSW-1:0]    part_spl_idx  [N_PART],
  input  logic [KEY_W-1:0]  part_spl_val  [N_PART],
  input  logic [ROW-1:0]    csel_offset   [N_CSEL],
  input  logic [CBW-1:0]    csel_bytes    [N_CSEL],
  input  logic [CBW-1:0]    cat_b_bytes   [N_CAT],
  input  logic [CBW-1:0]    stitch_bytes  [N_STCH][SIN],
  // memory side: inbound stream buffers (filled by stream loads)
  input  logic [N_SBIN-1:0]  sbin_valid,
  output logic [N_SBIN-1:0]  sbin_ready,
  input  logic [REC_W-1:0]   sbin_data [N_SBIN],
  input  logic [N_SBIN-1:0]  sbin_eos,
  // memory side: outbound stream buffers (emptied by stream stores)
  output logic [N_SBOUT-1:0] sbout_valid,
  input  logic [N_SBOUT-1:0] sbout_ready,
  output logic [REC_W-1:0]   sbout_data [N_SBOUT],
  output logic [TAGW-1:0]    sbout_tag  [N_SBOUT],
  output logic [N_SBOUT-1:0] sbout_eos,
  // status and events
  output logic [N_SORT-1:0]  sort_overflow,
  output logic [N_SORT-1:0]  sort_busy,
  output logic [N_PART-1:0]  part_stall,
  output logic [N_PART-1:0]  part_b2b
);
  // Base numbers of each tile type among sources and sinks.
  localparam int unsigned S_AGG  = N_SBIN;
  localparam int unsigned S_ALU  = S_AGG  + N_AGG;
  localparam int unsigned S_BOOL = S_ALU  + N_ALU;
  localparam int unsigned S_CF   = S_BOOL + N_BOOL;
  localparam int unsigned S_JOIN = S_CF   + N_CFILT;
  localparam int unsigned S_PART = S_JOIN + N_JOIN;
  localparam int unsigned S_SORT = S_PART + N_PART;
  localparam int unsigned S_APP  = S_SORT + N_SORT;
  localparam int unsigned S_CSEL = S_APP  + N_APP;
  localparam int unsigned S_CAT  = S_CSEL + N_CSEL;
  localparam int unsigned S_STCH = S_CAT  + N_CAT;

  localparam int unsigned K_AGG  = 0;
  localparam int unsigned K_ALU  = K_AGG  + 2*N_AGG;
  localparam int unsigned K_BOOL = K_ALU  + 2*N_ALU;
  localparam int unsigned K_CF   = K_BOOL + 2*N_BOOL;
  localparam int unsigned K_JOIN = K_CF   + 2*N_CFILT;
  localparam int unsigned K_PART = K_JOIN + 2*N_JOIN;
  localparam int unsigned K_SORT = K_PART + N_PART;
  localparam int unsigned K_APP  = K_SORT + N_SORT;
  localparam int unsigned K_CSEL = K_APP  + 2*N_APP;
  localparam int unsigned K_CAT  = K_CSEL + N_CSEL;
  localparam int unsigned K_STCH = K_CAT  + 2*N_CAT;
  localparam int unsigned K_SBO  = K_STCH + SIN*N_STCH;

  // Sources (producer side of the fabric).
  logic [NSRC-1:0] src_valid, src_ready;
  logic [WW-1:0]   src_word [NSRC];
  // Sinks (consumer side): interconnect push, queue output to the tile.
  logic [NSNK-1:0] snk_push, snk_room, snk_valid, snk_ready;
  logic [WW-1:0]   snk_out [NSNK];

  function automatic logic [WW-1:0] word(input logic eos, input logic [TAGW-1:0] tag,
                                         input logic [REC_W-1:0] d);
    return {eos, tag, d};
  endfunction

  // ---------------------------------------------------------------- fabric
  always_comb begin
    logic [NSRC-1:0] used, room_all;
    used     = '0;
    room_all = '1;
    for (int k = 0; k < NSNK; k++) begin
      if (sink_en[k]) begin
        used[sink_sel[k]] = 1'b1;
        if (!snk_room[k]) room_all[sink_sel[k]] = 1'b0;
      end
    end
    src_ready = used & room_all;
    for (int k = 0; k < NSNK; k++)
      snk_push[k] = sink_en[k] && src_valid[sink_sel[k]] && src_ready[sink_sel[k]];
  end

  // Input queues of the tiles; the outbound stream buffers are sinks themselves.
  for (genvar k = 0; k < K_SBO; k++) begin : g_q
    q100_port_fifo #(.W(WW)) u_q (
      .clk, .rst_n,
      .push      (snk_push[k]),
      .push_data (src_word[sink_sel[k]]),
      .room      (snk_room[k]),
      .valid     (snk_valid[k]),
      .ready     (snk_ready[k]),
      .data      (snk_out[k])
    );
  end

  // Fields of the word at the head of each sink queue.
  logic [NSNK-1:0]  snk_eos;
  logic [REC_W-1:0] snk_rec [NSNK];
  logic [COL_W-1:0] snk_col [NSNK];
  logic [ALU_W-1:0] snk_alu [NSNK];
  logic [NSNK-1:0]  snk_bit;
  always_comb begin
    for (int k = 0; k < NSNK; k++) begin
      snk_eos[k] = snk_out[k][WW-1];
      snk_rec[k] = snk_out[k][REC_W-1:0];
      snk_col[k] = snk_out[k][COL_W-1:0];
      snk_alu[k] = snk_out[k][ALU_W-1:0];
      snk_bit[k] = snk_out[k][0];
    end
  end

  // ---------------------------------------------------------------- stream buffers
  for (genvar i = 0; i < N_SBIN; i++) begin : g_sbin
    logic [REC_W:0] pop_d;
    stream_buffer #(.WIDTH(REC_W + 1), .DEPTH(SB_DEPTH), .INBOUND(1'b1)) u_sb (
      .clk, .rst_n, .ctx_hold (1'b0),
      .mem_push_valid (sbin_valid[i]),
      .mem_push_ready (sbin_ready[i]),
      .mem_push_data  ({sbin_eos[i], sbin_data[i]}),
      .mem_pop_valid  (),
      .mem_pop_ready  (1'b0),
      .mem_pop_data   (),
      .acc_push_valid (1'b0),
      .acc_push_ready (),
      .acc_push_data  ('0),
      .acc_pop_valid  (src_valid[i]),
      .acc_pop_ready  (src_ready[i]),
      .acc_pop_data   (pop_d),
      .count          ()
    );
    assign src_word[i] = word(pop_d[REC_W], '0, pop_d[REC_W-1:0]);
  end

  for (genvar i = 0; i < N_SBOUT; i++) begin : g_sbout
    logic [WW-1:0] pop_d;
    stream_buffer #(.WIDTH(WW), .DEPTH(SB_DEPTH), .INBOUND(1'b0)) u_sb (
      .clk, .rst_n, .ctx_hold (1'b0),
      .mem_push_valid (1'b0),
      .mem_push_ready (),
      .mem_push_data  ('0),
      .mem_pop_valid  (sbout_valid[i]),
      .mem_pop_ready  (sbout_ready[i]),
      .mem_pop_data   (pop_d),
      .acc_push_valid (snk_push[K_SBO+i]),
      .acc_push_ready (snk_room[K_SBO+i]),
      .acc_push_data  (src_word[sink_sel[K_SBO+i]]),
      .acc_pop_valid  (),
      .acc_pop_ready  (1'b0),
      .acc_pop_data   (),
      .count          ()
    );
    assign sbout_eos[i]  = pop_d[WW-1];
    assign sbout_tag[i]  = pop_d[REC_W +: TAGW];
    assign sbout_data[i] = pop_d[REC_W-1:0];
    assign snk_valid[K_SBO+i] = 1'b0;
    assign snk_out[K_SBO+i]   = '0;
  end

  // ---------------------------------------------------------------- functional tiles
  for (genvar i = 0; i < N_AGG; i++) begin : g_agg
    localparam int unsigned K = K_AGG + 2*i;
    logic [COL_W-1:0] yg, yd;
    logic             ye;
    q100_aggregator #(.W(COL_W)) u_t (
      .clk, .rst_n, .cfg_op (agg_op[i]),
      .g_valid (snk_valid[K]),   .g_ready (snk_ready[K]),   .g_data (snk_col[K]),   .g_eos (snk_eos[K]),
      .d_valid (snk_valid[K+1]), .d_ready (snk_ready[K+1]), .d_data (snk_col[K+1]), .d_eos (snk_eos[K+1]),
      .y_valid (src_valid[S_AGG+i]), .y_ready (src_ready[S_AGG+i]),
      .y_group (yg), .y_data (yd), .y_eos (ye)
    );
    assign src_word[S_AGG+i] = word(ye, '0, REC_W'({yd, yg}));
  end

  for (genvar i = 0; i < N_ALU; i++) begin : g_alu
    localparam int unsigned K = K_ALU + 2*i;
    logic [ALU_W-1:0] yd;
    logic             ye;
    q100_alu #(.W(ALU_W)) u_t (
      .clk, .rst_n, .cfg_op (alu_op[i]), .cfg_use_const (alu_use_const[i]), .cfg_const (alu_const[i]),
      .a_valid (snk_valid[K]),   .a_ready (snk_ready[K]),   .a_data (snk_alu[K]),   .a_eos (snk_eos[K]),
      .b_valid (snk_valid[K+1]), .b_ready (snk_ready[K+1]), .b_data (snk_alu[K+1]), .b_eos (snk_eos[K+1]),
      .y_valid (src_valid[S_ALU+i]), .y_ready (src_ready[S_ALU+i]), .y_data (yd), .y_eos (ye)
    );
    assign src_word[S_ALU+i] = word(ye, '0, REC_W'(yd));
  end

  for (genvar i = 0; i < N_BOOL; i++) begin : g_bool
    localparam int unsigned K = K_BOOL + 2*i;
    logic yd, ye;
    q100_boolgen #(.W(COL_W)) u_t (
      .clk, .rst_n, .cfg_op (bool_op[i]), .cfg_use_const (bool_use_const[i]), .cfg_const (bool_const[i]),
      .a_valid (snk_valid[K]),   .a_ready (snk_ready[K]),   .a_data (snk_col[K]),   .a_eos (snk_eos[K]),
      .b_valid (snk_valid[K+1]), .b_ready (snk_ready[K+1]), .b_data (snk_col[K+1]), .b_eos (snk_eos[K+1]),
      .y_valid (src_valid[S_BOOL+i]), .y_ready (src_ready[S_BOOL+i]), .y_data (yd), .y_eos (ye)
    );
    assign src_word[S_BOOL+i] = word(ye, '0, REC_W'(yd));
  end

  for (genvar i = 0; i < N_CFILT; i++) begin : g_cf
    localparam int unsigned K = K_CF + 2*i;
    logic [COL_W-1:0] yd;
    logic             ye;
    q100_colfilter #(.W(COL_W)) u_t (
      .clk, .rst_n,
      .b_valid (snk_valid[K]),   .b_ready (snk_ready[K]),   .b_data (snk_bit[K]),           .b_eos (snk_eos[K]),
      .d_valid (snk_valid[K+1]), .d_ready (snk_ready[K+1]), .d_data (snk_col[K+1]), .d_eos (snk_eos[K+1]),
      .y_valid (src_valid[S_CF+i]), .y_ready (src_ready[S_CF+i]), .y_data (yd), .y_eos (ye)
    );
    assign src_word[S_CF+i] = word(ye, '0, REC_W'(yd));
  end

  for (genvar i = 0; i < N_JOIN; i++) begin : g_join
    localparam int unsigned K = K_JOIN + 2*i;
    logic [REC_W-1:0] yd;
    logic             ye;
    q100_joiner #(.REC_W(REC_W), .KEY_W(KEY_W)) u_t (
      .clk, .rst_n,
      .p_valid (snk_valid[K]),   .p_ready (snk_ready[K]),   .p_data (snk_rec[K]),   .p_eos (snk_eos[K]),
      .f_valid (snk_valid[K+1]), .f_ready (snk_ready[K+1]), .f_data (snk_rec[K+1]), .f_eos (snk_eos[K+1]),
      .y_valid (src_valid[S_JOIN+i]), .y_ready (src_ready[S_JOIN+i]), .y_data (yd), .y_eos (ye)
    );
    assign src_word[S_JOIN+i] = word(ye, '0, yd);
  end

  for (genvar i = 0; i < N_PART; i++) begin : g_part
    localparam int unsigned K  = K_PART + i;
    localparam int unsigned PW = $clog2(2 * PART_SPLIT + 1);
    logic [REC_W-1:0] yd;
    logic [PW-1:0]    yp;
    logic             ye;
    q100_partitioner #(.N_SPLIT(PART_SPLIT), .REC_W(REC_W), .KEY_W(KEY_W)) u_t (
      .clk, .rst_n,
      .spl_we (part_spl_we[i]), .spl_idx (part_spl_idx[i]), .spl_val (part_spl_val[i]),
      .a_valid (snk_valid[K]), .a_ready (snk_ready[K]), .a_data (snk_rec[K]), .a_eos (snk_eos[K]),
      .y_valid (src_valid[S_PART+i]), .y_ready (src_ready[S_PART+i]),
      .y_data (yd), .y_part (yp), .y_eos (ye),
      .conv_stall (part_stall[i]), .merge_b2b (part_b2b[i])
    );
    assign src_word[S_PART+i] = word(ye, TAGW'(yp), yd);
  end

  for (genvar i = 0; i < N_SORT; i++) begin : g_sort
    localparam int unsigned K = K_SORT + i;
    logic [REC_W-1:0] yd;
    logic             ye;
    q100_sorter #(.N(SORT_N), .REC_W(REC_W), .KEY_W(KEY_W)) u_t (
      .clk, .rst_n,
      .a_valid (snk_valid[K]), .a_ready (snk_ready[K]), .a_data (snk_rec[K]), .a_eos (snk_eos[K]),
      .y_valid (src_valid[S_SORT+i]), .y_ready (src_ready[S_SORT+i]), .y_data (yd), .y_eos (ye),
      .overflow (sort_overflow[i]), .sorting (sort_busy[i])
    );
    assign src_word[S_SORT+i] = word(ye, '0, yd);
  end

  // ---------------------------------------------------------------- auxiliary tiles
  for (genvar i = 0; i < N_APP; i++) begin : g_app
    localparam int unsigned K = K_APP + 2*i;
    logic [WW-1:0] yd;
    logic          ye;
    // Tags travel with the records, so appended partitions keep their numbers.
    q100_append #(.W(WW)) u_t (
      .clk, .rst_n,
      .a_valid (snk_valid[K]),   .a_ready (snk_ready[K]),   .a_data (snk_out[K]),   .a_eos (snk_eos[K]),
      .b_valid (snk_valid[K+1]), .b_ready (snk_ready[K+1]), .b_data (snk_out[K+1]), .b_eos (snk_eos[K+1]),
      .y_valid (src_valid[S_APP+i]), .y_ready (src_ready[S_APP+i]), .y_data (yd), .y_eos (ye)
    );
    assign src_word[S_APP+i] = {ye, yd[WW-2:0]};
  end

  for (genvar i = 0; i < N_CSEL; i++) begin : g_csel
    localparam int unsigned K = K_CSEL + i;
    logic [COL_W-1:0] yd;
    logic             ye;
    q100_colselect #(.REC_W(REC_W), .COL_W(COL_W)) u_t (
      .clk, .rst_n, .cfg_offset (csel_offset[i]), .cfg_bytes (csel_bytes[i]),
      .a_valid (snk_valid[K]), .a_ready (snk_ready[K]), .a_data (snk_rec[K]), .a_eos (snk_eos[K]),
      .y_valid (src_valid[S_CSEL+i]), .y_ready (src_ready[S_CSEL+i]), .y_data (yd), .y_eos (ye)
    );
    assign src_word[S_CSEL+i] = word(ye, '0, REC_W'(yd));
  end

  for (genvar i = 0; i < N_CAT; i++) begin : g_cat
    localparam int unsigned K = K_CAT + 2*i;
    logic [COL_W-1:0] yd;
    logic             ye;
    q100_concat #(.W(COL_W)) u_t (
      .clk, .rst_n, .cfg_b_bytes (cat_b_bytes[i]),
      .a_valid (snk_valid[K]),   .a_ready (snk_ready[K]),   .a_data (snk_col[K]),   .a_eos (snk_eos[K]),
      .b_valid (snk_valid[K+1]), .b_ready (snk_ready[K+1]), .b_data (snk_col[K+1]), .b_eos (snk_eos[K+1]),
      .y_valid (src_valid[S_CAT+i]), .y_ready (src_ready[S_CAT+i]), .y_data (yd), .y_eos (ye)
    );
    assign src_word[S_CAT+i] = word(ye, '0, REC_W'(yd));
  end

  for (genvar i = 0; i < N_STCH; i++) begin : g_stch
    localparam int unsigned K = K_STCH + SIN*i;
    logic [COL_W-1:0] cd [SIN];
    logic [SIN-1:0]   ce;
    logic [REC_W-1:0] yd;
    logic             ye;
    for (genvar c = 0; c < SIN; c++) begin : g_c
      assign cd[c] = snk_col[K+c];
      assign ce[c] = snk_eos[K+c];
    end
    q100_stitch #(.NIN(SIN), .COL_W(COL_W), .REC_W(REC_W)) u_t (
      .clk, .rst_n, .cfg_bytes (stitch_bytes[i]),
      .c_valid (snk_valid[K +: SIN]), .c_ready (snk_ready[K +: SIN]), .c_data (cd), .c_eos (ce),
      .y_valid (src_valid[S_STCH+i]), .y_ready (src_ready[S_STCH+i]), .y_data (yd), .y_eos (ye)
    );
    assign src_word[S_STCH+i] = word(ye, '0, yd);
  end

  // Unused sink-side ready of the outbound buffers.
  for (genvar i = 0; i < N_SBOUT; i++) begin : g_sbo_r
    assign snk_ready[K_SBO+i] = 1'b0;
  end

endmodule
