// tb_q100_colselect: random records, random byte offset and width; each output
// element must be the selected bytes of its record, zero-extended.
`include "tb_q100_common.svh"
module tb_q100_colselect;
  import q100_pkg::*;
  `TB_CLOCK(200000)
  `TB_SRC(a, REC_W)
  `TB_SNK(y, COL_W)
  logic [$clog2(REC_W/8)-1:0]   cfg_offset;
  logic [$clog2(COL_W/8+1)-1:0] cfg_bytes;

  q100_colselect dut (.*);

  task automatic run(int n, int off, int nb);
    logic [COL_W-1:0] exp_q [$];
    cfg_offset = off[$bits(cfg_offset)-1:0]; cfg_bytes = nb[$bits(cfg_bytes)-1:0];
    a_q.delete(); y_got.delete(); y_eosn = 0;
    for (int i = 0; i < n; i++) begin
      logic [REC_W-1:0] r;
      logic [REC_W-1:0] s;
      for (int k = 0; k < REC_W / 32; k++) r[32*k +: 32] = $urandom;
      a_q.push_back(r);
      s = r >> (8 * off);
      exp_q.push_back(COL_W'(s) & ((nb == COL_W/8) ? '1 : ((COL_W'(1) << (8 * nb)) - 1)));
    end
    a_clr = 1; @(posedge clk); #1 a_clr = 0;
    a_go = 1;
    wait (y_eosn == 1);
    @(negedge clk); a_go = 0;
    `CHK(y_got.size() == n, "element count")
    foreach (exp_q[i]) if (i < y_got.size())
      `CHK(y_got[i] == exp_q[i], $sformatf("offset %0d bytes %0d element %0d", off, nb, i))
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(20, 0, 4); run(20, 8, 8); run(20, 100, 32); run(20, 127, 1); run(20, 120, 8);
    repeat (5) run(20, $urandom_range(0, 96), $urandom_range(1, 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
