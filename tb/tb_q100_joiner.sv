// tb_q100_joiner: a primary-key table with unique ascending keys and a foreign-key
// table with ascending, repeated keys, some of which have no partner; the output
// must hold one joined record per matching foreign record, in order, laid out as
// {foreign[511:0], primary[511:0]}.
`include "tb_q100_common.svh"
module tb_q100_joiner;
  import q100_pkg::*;
  localparam int W = REC_W;
  `TB_CLOCK(200000)
  `TB_SRC(p, W)
  `TB_SRC(f, W)
  `TB_SNK(y, W)

  q100_joiner dut (.*);

  function automatic logic [W-1:0] rrec(logic [KEY_W-1:0] key);
    logic [W-1:0] r;
    for (int k = 0; k < W / 32; k++) r[32*k +: 32] = $urandom;
    r[KEY_W-1:0] = key;
    return r;
  endfunction

  task automatic run(int np, int nf);
    logic [W-1:0] exp_q [$];
    logic [KEY_W-1:0] pk [$];
    logic [KEY_W-1:0] k;
    p_q.delete(); f_q.delete(); y_got.delete(); y_eosn = 0;
    k = 0;
    for (int i = 0; i < np; i++) begin
      k += KEY_W'($urandom_range(1, 3));
      pk.push_back(k); p_q.push_back(rrec(k));
    end
    k = 0;
    for (int i = 0; i < nf; i++) begin
      if ($urandom_range(0, 2) != 0) k += KEY_W'($urandom_range(0, 2));
      f_q.push_back(rrec(k));
      foreach (pk[j]) if (pk[j] == k) exp_q.push_back({f_q[i][W/2-1:0], p_q[j][W/2-1:0]});
    end
    p_clr = 1; f_clr = 1; @(posedge clk); #1 p_clr = 0; f_clr = 0;
    p_go = 1; f_go = 1;
    wait (y_eosn == 1);
    repeat (2) @(negedge clk);
    p_go = 0; f_go = 0;
    `CHK(y_got.size() == exp_q.size(), $sformatf("%0d joined, expected %0d", y_got.size(), exp_q.size()))
    foreach (exp_q[i]) if (i < y_got.size())
      `CHK(y_got[i] == exp_q[i], $sformatf("joined record %0d", i))
    `CHK(p_i == np + 1 && f_i == nf + 1, "both inputs consumed to their end beats")
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(30, 60); run(60, 20); run(0, 10); run(10, 0); run(40, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
