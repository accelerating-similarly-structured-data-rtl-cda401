// tb_q100_partitioner: seven ascending splitters are loaded, then tables with
// random keys (many equal to a splitter) and one table whose keys all fall in one
// partition. Every record must come out once, tagged with the partition worked
// out here (below splitter i: 2i, equal: 2i+1, above all: 14), with each
// partition's records in input order. The skewed table must make the merge send
// the same partition back to back and the conveyor stall.
`include "tb_q100_common.svh"
module tb_q100_partitioner;
  import q100_pkg::*;
  localparam int W = REC_W, NS = PART_SPLIT, NP = 2 * NS + 1;
  `TB_CLOCK(200000)
  `TB_SRC(a, W)
  logic y_valid, y_ready = 1'b0, y_eos;
  logic [W-1:0] y_data;
  logic [$clog2(NP)-1:0] y_part;
  logic [W-1:0] got [NP][$];
  int y_eosn = 0, ngot = 0;
  always @(negedge clk) y_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk)
    if (y_valid && y_ready) begin
      if (y_eos) y_eosn++;
      else begin got[y_part].push_back(y_data); ngot++; end
    end
  logic spl_we;
  logic [$clog2(NS)-1:0] spl_idx;
  logic [KEY_W-1:0] spl_val;
  logic conv_stall, merge_b2b;
  int stalls = 0, b2b = 0;
  always @(posedge clk) begin
    if (conv_stall) stalls++;
    if (merge_b2b) b2b++;
  end
  logic [KEY_W-1:0] spl [NS];

  q100_partitioner dut (.*);

  function automatic int ref_part(logic [KEY_W-1:0] k);
    for (int i = 0; i < NS; i++) begin
      if (k < spl[i]) return 2 * i;
      if (k == spl[i]) return 2 * i + 1;
    end
    return 2 * NS;
  endfunction

  task automatic run(int n, bit skew);
    logic [W-1:0] exp_q [NP][$];
    a_q.delete(); y_eosn = 0; ngot = 0;
    foreach (got[p]) got[p].delete();
    for (int i = 0; i < n; i++) begin
      logic [W-1:0] r;
      for (int k = 0; k < W / 32; k++) r[32*k +: 32] = $urandom;
      if (skew) r[KEY_W-1:0] = spl[3] + 1;
      else if ($urandom_range(0, 3) == 0) r[KEY_W-1:0] = spl[$urandom_range(0, NS-1)];
      else r[KEY_W-1:0] = KEY_W'($urandom_range(0, 900));
      a_q.push_back(r);
      exp_q[ref_part(r[KEY_W-1:0])].push_back(r);
    end
    a_clr = 1; @(posedge clk); #1 a_clr = 0;
    a_go = 1;
    wait (y_eosn == 1);
    @(negedge clk); a_go = 0;
    `CHK(ngot == n, $sformatf("%0d records out of %0d", ngot, n))
    for (int p = 0; p < NP; p++)
      `CHK(got[p] == exp_q[p], $sformatf("partition %0d: %0d records, expected %0d", p, got[p].size(), exp_q[p].size()))
  endtask

  initial begin
    spl_we = 0; spl_idx = 0; spl_val = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NS; i++) begin
      spl[i] = KEY_W'(100 * (i + 1) + $urandom_range(0, 50));
      @(negedge clk); spl_we = 1; spl_idx = i[$clog2(NS)-1:0]; spl_val = spl[i];
    end
    @(negedge clk); spl_we = 0;
    run(200, 0); run(1, 0); run(0, 0); run(100, 1); run(300, 0);
    `CHK(stalls > 0 && b2b > 0, $sformatf("stalls %0d back-to-back %0d", stalls, b2b))
    $display("stalls=%0d back_to_back=%0d", stalls, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
