// Q100 query scenario, included inside a testbench module that imports q100_pkg,
// declares clk, rst_n, checks, failures and the CHK macro (tb_q100_common.svh),
// and connects the signals declared here to a q100 tile array at its default
// size (directly or through the top).
//
// The stream-buffer models: qs_in[i] is streamed into inbound buffer i (then one
// end beat) once qs_go[i] is set; outbound buffers are drained with random
// back-pressure into qs_out[j] / qs_tag[j], end beats counted in qs_eos[j].
//
// Three queries, each checked against a reference worked out here:
//  qs_query_filter: a selection, projection, arithmetic, sort and group-by
//    aggregation, plus a range partitioning of the same intermediate table:
//      A, B, C = columns at bytes 0, 8, 16 of table T (column selectors)
//      keep    = C < threshold (boolean generator), A', B' = filtered A, B
//      B3      = B' * 3 (ALU with constant);  R = stitch(A', B3)
//      out0    = SUM(B3) GROUP BY A' (sorter, two column selectors, aggregator)
//      out1    = R partitioned on A' by seven splitters (partitioner)
//  qs_query_join: a join of a primary-key and a foreign-key table appended to a
//    third table (out0), and two 4-byte columns concatenated (out1).
//  qs_query_overflow: a table larger than the sorter raises its exception.
localparam int QS_NSRC = N_SBIN + N_AGG + N_ALU + N_BOOL + N_CFILT + N_JOIN + N_PART + N_SORT + N_APP + N_CSEL + N_CAT + N_STCH;
localparam int QS_NSNK = 2*N_AGG + 2*N_ALU + 2*N_BOOL + 2*N_CFILT + 2*N_JOIN + N_PART + N_SORT + 2*N_APP + N_CSEL + 2*N_CAT + STITCH_IN*N_STCH + N_SBOUT;
localparam int QS_CBW  = $clog2(COL_W / 8 + 1);
// source numbers
localparam int S_AGG  = N_SBIN,         S_ALU  = S_AGG + N_AGG,   S_BOOL = S_ALU + N_ALU;
localparam int S_CF   = S_BOOL + N_BOOL, S_JOIN = S_CF + N_CFILT,  S_PART = S_JOIN + N_JOIN;
localparam int S_SORT = S_PART + N_PART, S_APP  = S_SORT + N_SORT, S_CSEL = S_APP + N_APP;
localparam int S_CAT  = S_CSEL + N_CSEL, S_STCH = S_CAT + N_CAT;
// sink numbers
localparam int K_AGG  = 0,                 K_ALU  = K_AGG + 2*N_AGG,   K_BOOL = K_ALU + 2*N_ALU;
localparam int K_CF   = K_BOOL + 2*N_BOOL, K_JOIN = K_CF + 2*N_CFILT,  K_PART = K_JOIN + 2*N_JOIN;
localparam int K_SORT = K_PART + N_PART,   K_APP  = K_SORT + N_SORT,   K_CSEL = K_APP + 2*N_APP;
localparam int K_CAT  = K_CSEL + N_CSEL,   K_STCH = K_CAT + 2*N_CAT,   K_SBO  = K_STCH + STITCH_IN*N_STCH;

logic [$clog2(QS_NSRC)-1:0] sink_sel [QS_NSNK];
logic [QS_NSNK-1:0]  sink_en;
agg_op_e             agg_op [N_AGG];
alu_op_e             alu_op [N_ALU];
logic [N_ALU-1:0]    alu_use_const;
logic [ALU_W-1:0]    alu_const [N_ALU];
cmp_op_e             bool_op [N_BOOL];
logic [N_BOOL-1:0]   bool_use_const;
logic [COL_W-1:0]    bool_const [N_BOOL];
logic [N_PART-1:0]   part_spl_we;
logic [$clog2(PART_SPLIT)-1:0] part_spl_idx [N_PART];
logic [KEY_W-1:0]    part_spl_val [N_PART];
logic [$clog2(REC_W/8)-1:0] csel_offset [N_CSEL];
logic [QS_CBW-1:0]   csel_bytes [N_CSEL];
logic [QS_CBW-1:0]   cat_b_bytes [N_CAT];
logic [QS_CBW-1:0]   stitch_bytes [N_STCH][STITCH_IN];
logic [N_SBIN-1:0]   sbin_valid, sbin_ready, sbin_eos;
logic [REC_W-1:0]    sbin_data [N_SBIN];
logic [N_SBOUT-1:0]  sbout_valid, sbout_ready, sbout_eos;
logic [REC_W-1:0]    sbout_data [N_SBOUT];
logic [7:0]          sbout_tag [N_SBOUT];
logic [N_SORT-1:0]   sort_overflow, sort_busy;
logic [N_PART-1:0]   part_stall, part_b2b;

logic [REC_W-1:0] qs_in  [N_SBIN][$];
int               qs_ii  [N_SBIN];
bit               qs_go  [N_SBIN];
logic [REC_W-1:0] qs_out [N_SBOUT][$];
logic [7:0]       qs_tag [N_SBOUT][$];
int               qs_eos [N_SBOUT];
int qs_rdy_pct [N_SBOUT] = '{75, 75};
int qs_pstall = 0, qs_pb2b = 0, qs_sortcyc = 0, qs_ovf = 0, qs_fork = 0;

always @(posedge clk) if (rst_n) begin
  for (int i = 0; i < N_SBIN; i++) if (sbin_valid[i] && sbin_ready[i]) qs_ii[i]++;
  for (int j = 0; j < N_SBOUT; j++)
    if (sbout_valid[j] && sbout_ready[j]) begin
      if (sbout_eos[j]) qs_eos[j]++;
      else begin qs_out[j].push_back(sbout_data[j]); qs_tag[j].push_back(sbout_tag[j]); end
    end
  if (part_stall != 0) qs_pstall++;
  if (part_b2b != 0) qs_pb2b++;
  if (sort_busy != 0) qs_sortcyc++;
end

always @(negedge clk) begin
  for (int i = 0; i < N_SBIN; i++)
    if (!(sbin_valid[i] && !sbin_ready[i])) begin
      sbin_valid[i] = qs_go[i] && (qs_ii[i] <= qs_in[i].size()) && ($urandom_range(0, 4) != 0);
      sbin_eos[i]   = (qs_ii[i] == qs_in[i].size());
      sbin_data[i]  = (qs_ii[i] < qs_in[i].size()) ? qs_in[i][qs_ii[i]] : '0;
    end
  for (int j = 0; j < N_SBOUT; j++) sbout_ready[j] = ($urandom_range(0, 99) < qs_rdy_pct[j]);
end

task automatic qs_route(int snk, int src);
  sink_sel[snk] = src[$clog2(QS_NSRC)-1:0];
  sink_en[snk]  = 1'b1;
endtask

task automatic qs_clear();
  sink_en = '0;
  foreach (sink_sel[k]) sink_sel[k] = '0;
  for (int i = 0; i < N_SBIN; i++) begin qs_in[i].delete(); qs_ii[i] = 0; qs_go[i] = 0; end
  for (int j = 0; j < N_SBOUT; j++) begin qs_out[j].delete(); qs_tag[j].delete(); qs_eos[j] = 0; end
endtask

task automatic qs_init();
  qs_clear();
  sbin_valid = '0; sbin_eos = '0; sbout_ready = '0;
  foreach (sbin_data[i]) sbin_data[i] = '0;
  foreach (agg_op[i]) agg_op[i] = AGG_SUM;
  foreach (alu_op[i]) begin alu_op[i] = ALU_ADD; alu_const[i] = '0; end
  alu_use_const = '0; bool_use_const = '0;
  foreach (bool_op[i]) begin bool_op[i] = CMP_EQ; bool_const[i] = '0; end
  part_spl_we = '0;
  foreach (part_spl_idx[i]) begin part_spl_idx[i] = '0; part_spl_val[i] = '0; end
  foreach (csel_offset[i]) begin csel_offset[i] = '0; csel_bytes[i] = '0; end
  foreach (cat_b_bytes[i]) cat_b_bytes[i] = '0;
  foreach (stitch_bytes[i, c]) stitch_bytes[i][c] = '0;
endtask

task automatic qs_wait_eos(int j);
  wait (qs_eos[j] == 1);
  repeat (4) @(negedge clk);
  `CHK(qs_eos[j] == 1, $sformatf("outbound buffer %0d: one end beat", j))
endtask

function automatic logic [REC_W-1:0] qs_rrec();
  logic [REC_W-1:0] r;
  for (int w = 0; w < REC_W / 32; w++) r[32*w +: 32] = $urandom;
  return r;
endfunction

task automatic qs_query_filter(int n);
  logic [63:0] spl [PART_SPLIT];
  logic [63:0] thr, run_a;
  logic [255:0] sums [logic [63:0]];
  logic [REC_W-1:0] pexp [2*PART_SPLIT+1][$], pgot [2*PART_SPLIT+1][$];
  int k;
  qs_clear();
  thr = 64'd600;
  for (int s = 0; s < PART_SPLIT; s++) begin
    spl[s] = 64'(6 * (s + 1));
    @(negedge clk); part_spl_we[0] = 1; part_spl_idx[0] = s[$clog2(PART_SPLIT)-1:0]; part_spl_val[0] = spl[s];
  end
  @(negedge clk); part_spl_we[0] = 0;
  for (int i = 0; i < n; i++) begin
    logic [REC_W-1:0] r;
    logic [63:0] a, b, c;
    r = qs_rrec();
    // the group-by key comes in runs, so that one partition often has all the
    // buffered records (back-to-back sends) and fills its buffer (stalls)
    if (i == 0 || $urandom_range(0, 5) == 0) run_a = 64'($urandom_range(0, 50));
    a = run_a; b = 64'($urandom_range(0, 1 << 20)); c = 64'($urandom_range(0, 1000));
    r[63:0] = a; r[127:64] = b; r[191:128] = c;
    qs_in[0].push_back(r);
    if (c < thr) begin
      logic [REC_W-1:0] rr;
      int p;
      if (!sums.exists(a)) sums[a] = '0;
      sums[a] += 256'(b * 3);
      rr = '0; rr[63:0] = a; rr[127:64] = b * 3;
      p = 2 * PART_SPLIT;
      for (int s = PART_SPLIT - 1; s >= 0; s--) begin
        if (a < spl[s]) p = 2 * s;
        else if (a == spl[s] && p == 2 * PART_SPLIT) p = 2 * s + 1;
      end
      for (int s = 0; s < PART_SPLIT; s++) if (a == spl[s]) p = 2 * s + 1;
      pexp[p].push_back(rr);
    end
  end
  // configuration
  csel_offset[0] = 0;  csel_bytes[0] = 8;
  csel_offset[1] = 8;  csel_bytes[1] = 8;
  csel_offset[2] = 16; csel_bytes[2] = 8;
  csel_offset[3] = 0;  csel_bytes[3] = 8;
  csel_offset[4] = 8;  csel_bytes[4] = 8;
  bool_op[0] = CMP_LT; bool_use_const[0] = 1; bool_const[0] = COL_W'(thr);
  alu_op[0] = ALU_MUL; alu_use_const[0] = 1; alu_const[0] = 3;
  stitch_bytes[0][0] = 8; stitch_bytes[0][1] = 8;
  agg_op[0] = AGG_SUM;
  qs_route(K_CSEL + 0, 0); qs_route(K_CSEL + 1, 0); qs_route(K_CSEL + 2, 0);
  qs_route(K_BOOL + 0, S_CSEL + 2);
  qs_route(K_CF + 0, S_BOOL + 0); qs_route(K_CF + 1, S_CSEL + 0);
  qs_route(K_CF + 2, S_BOOL + 0); qs_route(K_CF + 3, S_CSEL + 1);
  qs_route(K_ALU + 0, S_CF + 1);
  qs_route(K_STCH + 0, S_CF + 0); qs_route(K_STCH + 1, S_ALU + 0);
  qs_route(K_SORT + 0, S_STCH + 0); qs_route(K_PART + 0, S_STCH + 0);
  qs_route(K_CSEL + 3, S_SORT + 0); qs_route(K_CSEL + 4, S_SORT + 0);
  qs_route(K_AGG + 0, S_CSEL + 3); qs_route(K_AGG + 1, S_CSEL + 4);
  qs_route(K_SBO + 0, S_AGG + 0); qs_route(K_SBO + 1, S_PART + 0);
  qs_fork += 5;
  // a slow consumer behind the partitioner makes its buffers fill and stall it
  qs_rdy_pct[1] = 40;
  @(negedge clk); qs_go[0] = 1;
  qs_wait_eos(0); qs_wait_eos(1);
  qs_rdy_pct[1] = 75;
  // group-by result, ascending groups
  k = 0;
  `CHK(qs_out[0].size() == sums.num(), $sformatf("%0d groups, expected %0d", qs_out[0].size(), sums.num()))
  foreach (sums[g]) begin
    if (k < qs_out[0].size())
      `CHK(qs_out[0][k][255:0] == 256'(g) && qs_out[0][k][511:256] == sums[g],
           $sformatf("group %0d: got %0d/%0d, expected %0d/%0d", k, qs_out[0][k][255:0], qs_out[0][k][511:256], g, sums[g]))
    k++;
  end
  // partitions, in input order within each
  foreach (qs_out[1][i]) pgot[qs_tag[1][i]].push_back(qs_out[1][i]);
  for (int p = 0; p < 2 * PART_SPLIT + 1; p++)
    `CHK(pgot[p] == pexp[p], $sformatf("partition %0d: %0d records, expected %0d", p, pgot[p].size(), pexp[p].size()))
endtask

task automatic qs_query_join(int np, int nf, int nc, int ncat);
  logic [REC_W-1:0] e0 [$], e1 [$], pq [$];
  logic [63:0] key;
  qs_clear();
  key = 0;
  for (int i = 0; i < np; i++) begin
    logic [REC_W-1:0] r;
    key += 64'($urandom_range(1, 3));
    r = qs_rrec(); r[63:0] = key;
    qs_in[1].push_back(r);
  end
  key = 0;
  for (int i = 0; i < nf; i++) begin
    logic [REC_W-1:0] r;
    if ($urandom_range(0, 2) != 0) key += 64'($urandom_range(0, 2));
    r = qs_rrec(); r[63:0] = key;
    qs_in[2].push_back(r);
    foreach (qs_in[1][j]) if (qs_in[1][j][63:0] == key) e0.push_back({r[REC_W/2-1:0], qs_in[1][j][REC_W/2-1:0]});
  end
  for (int i = 0; i < nc; i++) begin qs_in[3].push_back(qs_rrec()); e0.push_back(qs_in[3][i]); end
  for (int i = 0; i < ncat; i++) begin qs_in[4].push_back(qs_rrec()); e1.push_back(REC_W'(qs_in[4][i][63:0])); end
  csel_offset[5] = 0; csel_bytes[5] = 4;
  csel_offset[6] = 4; csel_bytes[6] = 4;
  cat_b_bytes[0] = 4;
  qs_route(K_JOIN + 0, 1); qs_route(K_JOIN + 1, 2);
  qs_route(K_APP + 0, S_JOIN + 0); qs_route(K_APP + 1, 3);
  qs_route(K_SBO + 0, S_APP + 0);
  qs_route(K_CSEL + 5, 4); qs_route(K_CSEL + 6, 4);
  qs_route(K_CAT + 0, S_CSEL + 6); qs_route(K_CAT + 1, S_CSEL + 5);
  qs_route(K_SBO + 1, S_CAT + 0);
  qs_fork += 1;
  @(negedge clk); qs_go[1] = 1; qs_go[2] = 1; qs_go[3] = 1; qs_go[4] = 1;
  qs_wait_eos(0); qs_wait_eos(1);
  `CHK(qs_out[0] == e0, $sformatf("join+append: %0d records, expected %0d", qs_out[0].size(), e0.size()))
  `CHK(qs_out[1] == e1, $sformatf("concatenation: %0d elements, expected %0d", qs_out[1].size(), e1.size()))
endtask

task automatic qs_query_overflow(int extra);
  int n;
  qs_clear();
  n = SORT_N + extra;
  for (int i = 0; i < n; i++) qs_in[5].push_back(qs_rrec());
  qs_route(K_SORT + 0, 5); qs_route(K_SBO + 0, S_SORT + 0);
  @(negedge clk); qs_go[5] = 1;
  qs_wait_eos(0);
  if (sort_overflow[0]) qs_ovf++;
  `CHK(sort_overflow[0], "sorter raised its overflow exception")
  `CHK(qs_out[0].size() == SORT_N, $sformatf("%0d records left the full sorter", qs_out[0].size()))
  for (int i = 1; i < qs_out[0].size(); i++)
    `CHK(qs_out[0][i-1][KEY_W-1:0] <= qs_out[0][i][KEY_W-1:0], "sorted order after overflow")
endtask
