// tb_q100_append: two random tables of random lengths (either may be empty); the
// output must be every record of a, then every record of b, then one end beat.
`include "tb_q100_common.svh"
module tb_q100_append;
  import q100_pkg::*;
  localparam int W = REC_W;
  `TB_CLOCK(200000)
  `TB_SRC(a, W)
  `TB_SRC(b, W)
  `TB_SNK(y, W)

  q100_append dut (.*);

  function automatic logic [W-1:0] rrec(int tag);
    logic [W-1:0] r;
    for (int k = 0; k < W / 32; k++) r[32*k +: 32] = $urandom;
    r[31:0] = tag;
    return r;
  endfunction

  task automatic run(int na, int nb);
    logic [W-1:0] exp_q [$];
    a_q.delete(); b_q.delete(); y_got.delete(); y_eosn = 0;
    for (int i = 0; i < na; i++) a_q.push_back(rrec(i));
    for (int i = 0; i < nb; i++) b_q.push_back(rrec(1000 + i));
    exp_q = {a_q, b_q};
    a_clr = 1; b_clr = 1; @(posedge clk); #1 a_clr = 0; b_clr = 0;
    a_go = 1; b_go = 1;
    wait (y_eosn == 1);
    repeat (3) @(negedge clk);
    a_go = 0; b_go = 0;
    `CHK(y_eosn == 1, "exactly one end beat")
    `CHK(y_got.size() == na + nb, $sformatf("%0d records, expected %0d", y_got.size(), na + nb))
    foreach (exp_q[i]) if (i < y_got.size())
      `CHK(y_got[i] == exp_q[i], $sformatf("record %0d", i))
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(20, 30); run(0, 10); run(10, 0); run(0, 0); run($urandom_range(1, 50), $urandom_range(1, 50));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
