// tb_q100_concat: pairs of random columns joined with random byte widths for the
// lower column; each output must equal (a << 8*b_bytes) | b truncated to the
// element width.
`include "tb_q100_common.svh"
module tb_q100_concat;
  import q100_pkg::*;
  localparam int W = COL_W;
  `TB_CLOCK(200000)
  `TB_SRC(a, W)
  `TB_SRC(b, W)
  `TB_SNK(y, W)
  logic [$clog2(W/8+1)-1:0] cfg_b_bytes;

  q100_concat dut (.*);

  task automatic run(int n, int bb);
    logic [W-1:0] exp_q [$];
    cfg_b_bytes = bb[$bits(cfg_b_bytes)-1:0];
    a_q.delete(); b_q.delete(); y_got.delete(); y_eosn = 0;
    for (int i = 0; i < n; i++) begin
      logic [W-1:0] x, z;
      x = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom} >> (8 * $urandom_range(0, 31));
      z = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      if (bb < W/8) z = z & ((W'(1) << (8 * bb)) - 1);
      a_q.push_back(x); b_q.push_back(z);
      exp_q.push_back((bb >= W/8) ? z : ((x << (8 * bb)) | z));
    end
    a_clr = 1; b_clr = 1; @(posedge clk); #1 a_clr = 0; b_clr = 0;
    a_go = 1; b_go = 1;
    wait (y_eosn == 1);
    @(negedge clk); a_go = 0; b_go = 0;
    `CHK(y_got.size() == n, "result count")
    foreach (exp_q[i]) if (i < y_got.size())
      `CHK(y_got[i] == exp_q[i], $sformatf("b_bytes %0d element %0d", bb, i))
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(30, 4); run(30, 8); run(30, 1); run(30, 16); run(30, $urandom_range(1, 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
