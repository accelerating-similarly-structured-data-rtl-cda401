// tb_q100_sorter: tables of random size (1 record, a few, a non-power of two, and
// the full 1024) with random keys and some repeated ones. The output must be in
// ascending key order and hold exactly the input records; the cycles spent
// sorting must equal (M/2)*log2(M)*(log2(M)+1)/2 for M the power of two holding
// the table. Last, a table of 1024+5 records must raise the overflow flag and
// still deliver 1024 sorted records.
`include "tb_q100_common.svh"
module tb_q100_sorter;
  import q100_pkg::*;
  localparam int W = REC_W;
  `TB_CLOCK(400000)
  `TB_SRC(a, W)
  `TB_SNK(y, W)
  logic overflow, sorting;
  int sort_cycles = 0;
  always @(posedge clk) if (sorting) sort_cycles++;

  q100_sorter dut (.*);

  task automatic run(int n, bit expect_ovf);
    logic [W-1:0] exp_q [$], got_s [$];
    int m, lg, want;
    a_q.delete(); y_got.delete(); y_eosn = 0; sort_cycles = 0;
    for (int i = 0; i < n; i++) begin
      logic [W-1:0] r;
      for (int k = 0; k < W / 32; k++) r[32*k +: 32] = $urandom;
      if ($urandom_range(0, 3) == 0) r[KEY_W-1:0] = KEY_W'($urandom_range(0, 7));
      a_q.push_back(r);
      if (i < SORT_N) exp_q.push_back(r);
    end
    a_clr = 1; @(posedge clk); #1 a_clr = 0;
    a_go = 1;
    wait (y_eosn == 1);
    @(negedge clk); a_go = 0;
    m = 1; lg = 0;
    while (m < ((n > SORT_N) ? SORT_N : n)) begin m *= 2; lg++; end
    want = (m / 2) * lg * (lg + 1) / 2;
    `CHK(y_got.size() == exp_q.size(), $sformatf("n=%0d: %0d records out", n, y_got.size()))
    for (int i = 1; i < y_got.size(); i++)
      `CHK(y_got[i-1][KEY_W-1:0] <= y_got[i][KEY_W-1:0], $sformatf("n=%0d: order at %0d", n, i))
    got_s = y_got; got_s.sort(); exp_q.sort();
    `CHK(got_s == exp_q, $sformatf("n=%0d: output is a permutation of the input", n))
    `CHK(sort_cycles == want, $sformatf("n=%0d: %0d sort cycles, expected %0d", n, sort_cycles, want))
    `CHK(overflow == expect_ovf, $sformatf("n=%0d: overflow flag %0d", n, overflow))
    $display("n=%0d sorted in %0d cycles", n, sort_cycles);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1, 0); run(2, 0); run(7, 0); run(100, 0); run(SORT_N, 0); run(SORT_N + 5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
