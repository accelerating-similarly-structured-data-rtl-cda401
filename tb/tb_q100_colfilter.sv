// tb_q100_colfilter: random boolean and data columns, including an all-false and
// an all-true stream; the output must be exactly the data elements whose boolean
// is set, in order, followed by one end beat.
`include "tb_q100_common.svh"
module tb_q100_colfilter;
  import q100_pkg::*;
  localparam int W = COL_W;
  `TB_CLOCK(200000)
  `TB_SRC(b, 1)
  `TB_SRC(d, W)
  `TB_SNK(y, W)

  q100_colfilter dut (.*);

  task automatic run(int n, int pct);
    logic [W-1:0] exp_q [$];
    b_q.delete(); d_q.delete(); y_got.delete(); y_eosn = 0;
    for (int i = 0; i < n; i++) begin
      logic [W-1:0] v;
      bit keep;
      v = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      keep = $urandom_range(0, 99) < pct;
      b_q.push_back(keep); d_q.push_back(v);
      if (keep) exp_q.push_back(v);
    end
    b_clr = 1; d_clr = 1; @(posedge clk); #1 b_clr = 0; d_clr = 0;
    b_go = 1; d_go = 1;
    wait (y_eosn == 1);
    @(negedge clk); b_go = 0; d_go = 0;
    `CHK(y_got.size() == exp_q.size(), $sformatf("%0d kept, expected %0d", y_got.size(), exp_q.size()))
    foreach (exp_q[i]) if (i < y_got.size())
      `CHK(y_got[i] == exp_q[i], $sformatf("element %0d", i))
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(100, 50); run(40, 0); run(40, 100); run(0, 50); run(200, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
