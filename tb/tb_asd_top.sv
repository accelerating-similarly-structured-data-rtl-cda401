// tb_asd_top: end-to-end test of the whole design at its default size: the HARP
// range-partitioning system (127 splitters, 255 partitions, stream buffers and
// LLC fill routing) and the Q100 tile array, side by side in the top, run at the
// same time. The HARP side partitions a 600-burst table loaded by stream loads
// among ordinary cache misses, with a context switch half way, then a skewed
// table; the Q100 side runs a filter/aggregate/partition query, a join/append/
// concatenate query and a table too large for the sorter. Every result is
// compared with a reference, and each mechanism is counted; a mechanism that
// never happened counts as a failure:
//   HARP conveyor stall, same-partition back-to-back burst, SB_in back-pressure
//   on stream fills, cache fill routed to the LLC, stream-buffer save and
//   restore, SB_out store; Q100 partitioner stall and back-to-back record,
//   stream fork in the fabric, sorter overflow exception.
`include "tb_q100_common.svh"
`define HS_NSPLIT harp_pkg::N_SPLITTERS
module tb_asd_top;
  import q100_pkg::*;
  `TB_CLOCK(400000)
  `include "tb_harp_scenario.svh"
  `include "tb_q100_scenario.svh"

  asd_top dut (
    .clk,
    .rst_n,
    .h_spl_we (spl_we),
    .h_spl_idx (spl_idx),
    .h_spl_val (spl_val),
    .h_partition_start (partition_start),
    .h_partition_stop (partition_stop),
    .h_harp_running (harp_running),
    .h_harp_done (harp_done),
    .h_req_valid (req_valid),
    .h_req_ready (req_ready),
    .h_req_addr (req_addr),
    .h_req_prefetch (req_prefetch),
    .h_req_stream (req_stream),
    .h_mem_req_valid (mem_req_valid),
    .h_mem_req_addr (mem_req_addr),
    .h_mem_req_tag (mem_req_tag),
    .h_fill_valid (fill_valid),
    .h_fill_ready (fill_ready),
    .h_fill_tag (fill_tag),
    .h_fill_data (fill_data),
    .h_llc_valid (llc_valid),
    .h_llc_addr (llc_addr),
    .h_llc_prefetch (llc_prefetch),
    .h_llc_data (llc_data),
    .h_sbst_valid (sbst_valid),
    .h_sbst_ready (sbst_ready),
    .h_sbst_addr (sbst_addr),
    .h_st_valid (st_valid),
    .h_st_addr (st_addr),
    .h_st_data (st_data),
    .h_st_part (st_part),
    .h_st_nrec (st_nrec),
    .h_ctx_hold (ctx_hold),
    .h_ctx_sel (ctx_sel),
    .h_save_valid (save_valid),
    .h_save_ready (save_ready),
    .h_save_data (save_data),
    .h_restore_valid (restore_valid),
    .h_restore_ready (restore_ready),
    .h_restore_data (restore_data),
    .h_sbin_count (sbin_count),
    .h_sbout_count (sbout_count),
    .h_conv_stall (conv_stall),
    .h_merge_b2b (merge_b2b),
    .q_sink_sel (sink_sel),
    .q_agg_op (agg_op),
    .q_alu_op (alu_op),
    .q_alu_const (alu_const),
    .q_bool_op (bool_op),
    .q_bool_const (bool_const),
    .q_part_spl_idx (part_spl_idx),
    .q_part_spl_val (part_spl_val),
    .q_csel_offset (csel_offset),
    .q_csel_bytes (csel_bytes),
    .q_cat_b_bytes (cat_b_bytes),
    .q_stitch_bytes (stitch_bytes),
    .q_sbin_data (sbin_data),
    .q_sbout_data (sbout_data),
    .q_sbout_tag (sbout_tag),
    .q_sink_en (sink_en),
    .q_alu_use_const (alu_use_const),
    .q_bool_use_const (bool_use_const),
    .q_part_spl_we (part_spl_we),
    .q_sbin_valid (sbin_valid),
    .q_sbin_ready (sbin_ready),
    .q_sbin_eos (sbin_eos),
    .q_sbout_valid (sbout_valid),
    .q_sbout_ready (sbout_ready),
    .q_sbout_eos (sbout_eos),
    .q_sort_overflow (sort_overflow),
    .q_sort_busy (sort_busy),
    .q_part_stall (part_stall),
    .q_part_b2b (part_b2b)
  );

  task automatic need(int n, string what);
    `CHK(n > 0, $sformatf("mechanism never happened: %s", what))
    $display("  %-34s %0d", what, n);
  endtask

  // The two sides run concurrently, each from its own process.
  bit harp_side_done = 0, q100_side_done = 0;
  initial begin
    wait (rst_n);
    hs_run(600, 40, 0);
    hs_run(150, 10, 1);
    harp_side_done = 1;
  end
  initial begin
    wait (rst_n);
    qs_query_filter(300);
    qs_query_join(40, 80, 20, 50);
    qs_query_overflow(3);
    q100_side_done = 1;
  end

  initial begin
    req_valid = 0; req_addr = 0; req_prefetch = 0; req_stream = 0;
    fill_valid = 0; fill_tag = 0; fill_data = 0; sbst_valid = 0; sbst_addr = 0;
    spl_we = 0; spl_idx = 0; spl_val = 0; partition_start = 0; partition_stop = 0;
    ctx_hold = 0; ctx_sel = 0; save_ready = 0; restore_valid = 0; restore_data = '0;
    qs_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (harp_side_done && q100_side_done);
    $display("mechanisms:");
    need(hs_stalls,   "HARP conveyor stall (cycles)");
    need(hs_b2b,      "HARP back-to-back same partition");
    need(hs_fillhold, "SB_in full, stream fill held");
    need(hs_llc,      "cache fill routed to LLC");
    need(hs_saves,    "stream buffer save (sbsave)");
    need(hs_restores, "stream buffer restore (sbrestore)");
    need(hs_stores,   "SB_out store (sbstore)");
    need(qs_pstall,   "Q100 partitioner stall (cycles)");
    need(qs_pb2b,     "Q100 partitioner back-to-back");
    need(qs_fork,     "Q100 stream fork");
    need(qs_ovf,      "Q100 sorter overflow exception");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
