// tb_q100_boolgen: all six comparisons against a column and against a constant,
// with values drawn so that equal, smaller and larger cases all occur; each output
// bit is compared with the comparison worked out here.
`include "tb_q100_common.svh"
module tb_q100_boolgen;
  import q100_pkg::*;
  localparam int W = COL_W;
  `TB_CLOCK(200000)
  `TB_SRC(a, W)
  `TB_SRC(b, W)
  `TB_SNK(y, 1)
  cmp_op_e cfg_op;
  logic cfg_use_const;
  logic [W-1:0] cfg_const;

  q100_boolgen dut (.*);

  function automatic bit ref_cmp(cmp_op_e op, logic [W-1:0] x, logic [W-1:0] z);
    case (op)
      CMP_EQ:  return x == z;
      CMP_NEQ: return x != z;
      CMP_LT:  return x < z;
      CMP_LTE: return x <= z;
      CMP_GT:  return x > z;
      default: return x >= z;
    endcase
  endfunction

  function automatic logic [W-1:0] rval();
    logic [W-1:0] v;
    v = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    return (W'($urandom_range(0, 7)) << (W - 3)) | (v >> 3);
  endfunction

  task automatic run(cmp_op_e op, bit uc, int n);
    bit exp_q [$];
    cfg_op = op; cfg_use_const = uc; cfg_const = rval();
    a_q.delete(); b_q.delete(); y_got.delete(); y_eosn = 0;
    for (int i = 0; i < n; i++) begin
      logic [W-1:0] x, z;
      x = rval();
      z = ($urandom_range(0, 2) == 0) ? x : rval();
      if (uc && $urandom_range(0, 2) == 0) x = cfg_const;
      a_q.push_back(x);
      if (!uc) b_q.push_back(z);
      exp_q.push_back(ref_cmp(op, x, uc ? cfg_const : z));
    end
    a_clr = 1; b_clr = 1; @(posedge clk); #1 a_clr = 0; b_clr = 0;
    a_go = 1; b_go = !uc;
    wait (y_eosn == 1);
    @(negedge clk); a_go = 0; b_go = 0;
    `CHK(y_got.size() == n, $sformatf("op %s: %0d results", op.name(), y_got.size()))
    foreach (exp_q[i]) if (i < y_got.size())
      `CHK(y_got[i] == exp_q[i], $sformatf("op %s elem %0d", op.name(), i))
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int o = 0; o <= 5; o++) begin
      run(cmp_op_e'(o), 1'b0, 60);
      run(cmp_op_e'(o), 1'b1, 60);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
