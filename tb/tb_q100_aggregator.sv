// tb_q100_aggregator: group-by columns sorted ascending with random group sizes
// (one-element groups included) and random data; for each operation every
// (group, result) pair is compared with a reference aggregation worked out here.
`include "tb_q100_common.svh"
module tb_q100_aggregator;
  import q100_pkg::*;
  localparam int W = COL_W;
  `TB_CLOCK(200000)
  `TB_SRC(g, W)
  `TB_SRC(d, W)
  logic y_valid, y_ready = 1'b0, y_eos;
  logic [W-1:0] y_group, y_data;
  logic [W-1:0] got_g [$], got_d [$];
  int y_eosn = 0;
  always @(negedge clk) y_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk)
    if (y_valid && y_ready) begin
      if (y_eos) y_eosn++;
      else begin got_g.push_back(y_group); got_d.push_back(y_data); end
    end
  agg_op_e cfg_op;

  q100_aggregator dut (.*);

  task automatic run(agg_op_e op, int ngroups);
    logic [W-1:0] eg [$], ed [$];
    logic [W-1:0] key;
    cfg_op = op;
    g_q.delete(); d_q.delete(); got_g.delete(); got_d.delete(); y_eosn = 0;
    key = W'($urandom_range(0, 5));
    for (int k = 0; k < ngroups; k++) begin
      int sz;
      logic [W-1:0] sum, mn, mx;
      sz = ($urandom_range(0, 3) == 0) ? 1 : $urandom_range(1, 8);
      sum = 0; mn = '1; mx = 0;
      for (int i = 0; i < sz; i++) begin
        logic [W-1:0] v;
        v = W'($urandom);
        g_q.push_back(key); d_q.push_back(v);
        sum += v; if (v < mn) mn = v; if (v > mx) mx = v;
      end
      eg.push_back(key);
      case (op)
        AGG_SUM:   ed.push_back(sum);
        AGG_COUNT: ed.push_back(W'(sz));
        AGG_MIN:   ed.push_back(mn);
        AGG_MAX:   ed.push_back(mx);
        default:   ed.push_back(sum / W'(sz));
      endcase
      key += W'($urandom_range(1, 1000));
    end
    g_clr = 1; d_clr = 1; @(posedge clk); #1 g_clr = 0; d_clr = 0;
    g_go = 1; d_go = 1;
    wait (y_eosn == 1);
    @(negedge clk); g_go = 0; d_go = 0;
    `CHK(got_g.size() == ngroups, $sformatf("op %s: %0d groups, expected %0d", op.name(), got_g.size(), ngroups))
    foreach (eg[i]) if (i < got_g.size())
      `CHK(got_g[i] == eg[i] && got_d[i] == ed[i], $sformatf("op %s group %0d: %0d/%0d expected %0d/%0d",
           op.name(), i, got_g[i], got_d[i], eg[i], ed[i]))
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int o = 0; o <= 4; o++) run(agg_op_e'(o), 25);
    run(AGG_SUM, 1); run(AGG_COUNT, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
