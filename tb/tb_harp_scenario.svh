// HARP system scenario, included inside a testbench module that declares clk,
// rst_n, checks, failures and the CHK macro (tb_q100_common.svh), and that
// connects the signals declared here to a harp_system (directly or through the
// top). HS_NSPLIT must be defined to the splitter count.
//
// What it does: loads ascending random splitters and starts partitioning. A model
// memory answers line requests out of order: stream loads (sbload) of NB bursts
// of the input table, mixed with ordinary cache misses whose fills must reach the
// cache with their address and prefetch bit. The testbench stores SB_out entries
// (sbstore) whenever one is ready. Half way through it performs a context switch:
// holds both buffers, saves SB_in then SB_out, restores them and releases. After
// the last burst it stops partitioning, drains, and checks that every record was
// stored exactly once under the partition its key selects (below splitter i: 2i,
// equal: 2i+1, above all: 2N). Counts of stalls, same-partition back-to-back
// bursts, cache fills, saves and restores are kept for the caller.
localparam int HS_NS = `HS_NSPLIT, HS_NP = 2 * HS_NS + 1;
localparam int HS_RW = harp_pkg::REC_W, HS_KW = harp_pkg::KEY_W, HS_R = harp_pkg::RECS_PER_BURST;
localparam int HS_BW = HS_RW * HS_R, HS_PW = $clog2(HS_NP), HS_NW = $clog2(HS_R + 1), HS_AW = 48, HS_TW = 4;
logic              spl_we;
logic [$clog2(HS_NS)-1:0] spl_idx;
logic [HS_KW-1:0]  spl_val;
logic              partition_start, partition_stop, harp_running, harp_done;
logic              req_valid, req_ready, req_prefetch, req_stream;
logic [HS_AW-1:0]  req_addr;
logic              mem_req_valid;
logic [HS_AW-1:0]  mem_req_addr;
logic [HS_TW-1:0]  mem_req_tag;
logic              fill_valid, fill_ready;
logic [HS_TW-1:0]  fill_tag;
logic [HS_BW-1:0]  fill_data;
logic              llc_valid, llc_prefetch;
logic [HS_AW-1:0]  llc_addr;
logic [HS_BW-1:0]  llc_data;
logic              sbst_valid, sbst_ready;
logic [HS_AW-1:0]  sbst_addr;
logic              st_valid;
logic [HS_AW-1:0]  st_addr;
logic [HS_BW-1:0]  st_data;
logic [HS_PW-1:0]  st_part;
logic [HS_NW-1:0]  st_nrec;
logic              ctx_hold, ctx_sel;
logic              save_valid, save_ready, restore_valid, restore_ready;
logic [HS_BW+HS_PW+HS_NW-1:0] save_data, restore_data;
logic [$clog2(harp_pkg::SB_IN_DEPTH+1)-1:0] sbin_count;
logic [$clog2(HS_NP+1)-1:0] sbout_count;
logic              conv_stall, merge_b2b;

logic [HS_KW-1:0]  hs_spl [HS_NS];
logic [HS_RW-1:0]  hs_exp [HS_NP][$];
logic [HS_RW-1:0]  hs_got [HS_NP][$];
logic [HS_BW-1:0]  hs_mem [logic [HS_AW-1:0]];
typedef struct { logic [HS_AW-1:0] addr; logic pf, st; logic [HS_TW-1:0] tag; } hs_req_t;
hs_req_t hs_out [$];
int hs_fillhold = 0, hs_stalls = 0, hs_b2b = 0, hs_llc = 0, hs_saves = 0, hs_restores = 0, hs_stores = 0, hs_full = 0;
int hs_cur = -1, hs_issued = 0, hs_nreq = 0, hs_nb = 0, hs_ncache = 0;
bit hs_stores_on = 0;

function automatic int hs_part(logic [HS_KW-1:0] k);
  for (int i = 0; i < HS_NS; i++) begin
    if (k < hs_spl[i]) return 2 * i;
    if (k == hs_spl[i]) return 2 * i + 1;
  end
  return 2 * HS_NS;
endfunction

// Memory model and monitors.
always @(posedge clk) if (rst_n) begin
  if (conv_stall) hs_stalls++;
  if (merge_b2b) hs_b2b++;
  if (sbout_count == HS_NP) hs_full++;
  if (fill_valid && !fill_ready) hs_fillhold++;
  if (mem_req_valid) begin
    hs_out.push_back('{req_addr, req_prefetch, req_stream, mem_req_tag});
    hs_issued++;
  end
  if (fill_valid && fill_ready) begin
    if (!hs_out[hs_cur].st) begin
      `CHK(llc_valid && llc_addr == hs_out[hs_cur].addr && llc_prefetch == hs_out[hs_cur].pf
           && llc_data == hs_mem[hs_out[hs_cur].addr], "cache fill reaches the cache")
      hs_llc++;
    end else
      `CHK(!llc_valid, "stream fill kept out of the cache")
    hs_out.delete(hs_cur);
    hs_cur = -1;
  end
  if (st_valid) begin
    `CHK(st_nrec >= 1 && st_nrec <= HS_R, "stored burst holds 1..4 records")
    for (int r = 0; r < HS_R; r++)
      if (r < st_nrec) hs_got[st_part].push_back(st_data[r*HS_RW +: HS_RW]);
    hs_stores++;
  end
end

always @(negedge clk) begin
  // requests: stream loads in address order, cache misses in between
  if (!(req_valid && !req_ready)) begin
    req_valid <= 1'b0;
    if (hs_issued < hs_nreq && $urandom_range(0, 1) == 0) begin
      bit cache;
      cache = (hs_ncache > 0) && ($urandom_range(0, 4) == 0 || hs_nb == 0);
      req_valid    <= 1'b1;
      req_stream   <= !cache;
      req_prefetch <= cache && ($urandom_range(0, 1) == 1);
      if (cache) begin
        req_addr <= 48'h8000_0000 + 48'(64 * (hs_ncache - 1));
        hs_ncache--;
      end else begin
        req_addr <= 48'(64 * (hs_nb - 1));
        hs_nb--;
      end
    end
  end
  // fills: a random outstanding request
  // a fill stays presented until accepted (hs_cur is cleared on acceptance)
  if (hs_cur == -1) begin
    if (hs_out.size() != 0 && $urandom_range(0, 2) != 0) begin
      hs_cur = $urandom_range(0, hs_out.size() - 1);
      fill_valid <= 1'b1; fill_tag <= hs_out[hs_cur].tag; fill_data <= hs_mem[hs_out[hs_cur].addr];
    end else begin
      fill_valid <= 1'b0;
    end
  end
  sbst_valid <= hs_stores_on && !ctx_hold && ($urandom_range(0, 3) != 0);
  sbst_addr  <= 48'h4000_0000 + 48'(64 * hs_stores);
end

task automatic hs_ctx_switch();
  logic [HS_BW+HS_PW+HS_NW-1:0] sv [$];
  for (int s = 0; s < 2; s++) begin
    @(negedge clk); ctx_hold = 1; ctx_sel = s[0];
    @(negedge clk);
    while (save_valid) begin
      save_ready = 1;
      @(posedge clk); sv.push_back(save_data); hs_saves++;
      @(negedge clk);
    end
    save_ready = 0;
    `CHK(s == 0 ? sbin_count == 0 : sbout_count == 0, "buffer empty after save")
    foreach (sv[i]) begin
      restore_valid = 1; restore_data = sv[i];
      @(posedge clk);
      `CHK(restore_ready, "restore accepted")
      hs_restores++;
      @(negedge clk);
    end
    restore_valid = 0;
    `CHK(s == 0 ? sbin_count == sv.size() : sbout_count == sv.size(), "buffer refilled by restore")
    sv.delete();
  end
  ctx_hold = 0; ctx_sel = 0;
endtask

// Runs the whole scenario on nbursts input bursts; skewed puts every key in one
// partition.
task automatic hs_run(int nbursts, int ncache, bit skewed);
  int total;
  spl_we = 0; spl_idx = 0; spl_val = 0; partition_start = 0; partition_stop = 0;
  ctx_hold = 0; ctx_sel = 0; save_ready = 0; restore_valid = 0; restore_data = '0;
  foreach (hs_exp[p]) begin hs_exp[p].delete(); hs_got[p].delete(); end
  hs_mem.delete();
  // splitters: ascending, spaced so that every partition can be hit
  for (int i = 0; i < HS_NS; i++) begin
    hs_spl[i] = HS_KW'((i + 1) * 1000 + $urandom_range(0, 400));
    @(negedge clk); spl_we = 1; spl_idx = i[$clog2(HS_NS)-1:0]; spl_val = hs_spl[i];
  end
  @(negedge clk); spl_we = 0;
  for (int b = 0; b < nbursts; b++) begin
    logic [HS_BW-1:0] d;
    for (int r = 0; r < HS_R; r++) begin
      logic [HS_RW-1:0] rec;
      logic [HS_KW-1:0] k;
      for (int w = 0; w < HS_RW / 32; w++) rec[32*w +: 32] = $urandom;
      if (skewed) k = hs_spl[HS_NS/2];
      else if ($urandom_range(0, 3) == 0) k = hs_spl[$urandom_range(0, HS_NS-1)];
      else k = HS_KW'($urandom_range(0, (HS_NS + 1) * 1000));
      rec[HS_KW-1:0] = k;
      d[r*HS_RW +: HS_RW] = rec;
      hs_exp[hs_part(k)].push_back(rec);
    end
    hs_mem[48'(64 * b)] = d;
  end
  for (int c = 0; c < ncache; c++)
    hs_mem[48'h8000_0000 + 48'(64 * c)] = {HS_BW/32{$urandom}};
  hs_nb = nbursts; hs_ncache = ncache; hs_nreq = nbursts + ncache; hs_issued = 0;
  // hs_nb / hs_ncache count down; addresses are issued from the top down
  @(negedge clk); partition_start = 1;
  @(negedge clk); partition_start = 0;
  hs_stores_on = 1;
  wait (hs_issued >= hs_nreq / 2);
  hs_ctx_switch();
  wait (hs_issued == hs_nreq && hs_out.size() == 0 && !fill_valid);
  wait (sbin_count == 0);
  @(negedge clk); partition_stop = 1;
  @(negedge clk); partition_stop = 0;
  wait (harp_done);
  wait (sbout_count == 0);
  repeat (4) @(negedge clk);
  hs_stores_on = 0;
  total = 0;
  for (int p = 0; p < HS_NP; p++) begin
    logic [HS_RW-1:0] a [$], b [$];
    // fills arrive out of order, so compare the records as sets
    a = hs_exp[p]; b = hs_got[p];
    a.sort(); b.sort();
    total += b.size();
    `CHK(a == b, $sformatf("partition %0d: %0d records stored, %0d expected", p, b.size(), a.size()))
  end
  `CHK(total == HS_R * nbursts, $sformatf("%0d records stored", total))
endtask
