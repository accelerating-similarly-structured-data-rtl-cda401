// tb_q100_alu: runs one stream per ALU operation, with column or constant second
// operand, random gaps on both inputs and random back-pressure on the output, and
// compares every result with a reference computed here.
`include "tb_q100_common.svh"
module tb_q100_alu;
  import q100_pkg::*;
  localparam int W = ALU_W;
  `TB_CLOCK(200000)
  `TB_SRC(a, W)
  `TB_SRC(b, W)
  `TB_SNK(y, W)
  alu_op_e cfg_op;
  logic cfg_use_const;
  logic [W-1:0] cfg_const;

  q100_alu dut (.*);

  function automatic logic [W-1:0] ref_op(alu_op_e op, logic [W-1:0] x, logic [W-1:0] z);
    case (op)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_MUL: return x * z;
      ALU_DIV: return (z == 0) ? '0 : x / z;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      default: return ~x;
    endcase
  endfunction

  task automatic run(alu_op_e op, bit uc, int n);
    logic [W-1:0] exp_q [$];
    cfg_op = op; cfg_use_const = uc; cfg_const = {$urandom, $urandom} >> $urandom_range(0, 60);
    a_q.delete(); b_q.delete(); y_got.delete(); y_eosn = 0;
    for (int i = 0; i < n; i++) begin
      logic [W-1:0] x, z;
      x = {$urandom, $urandom} >> $urandom_range(0, 63);
      z = (i % 9 == 4) ? '0 : {$urandom, $urandom} >> $urandom_range(0, 63);
      a_q.push_back(x);
      if (!uc) b_q.push_back(z);
      exp_q.push_back(ref_op(op, x, uc ? cfg_const : z));
    end
    a_clr = 1; b_clr = 1; @(posedge clk); #1 a_clr = 0; b_clr = 0;
    a_go = 1; b_go = !uc;
    wait (y_eosn == 1);
    @(negedge clk); a_go = 0; b_go = 0;
    `CHK(y_got.size() == n, $sformatf("op %s: %0d results", op.name(), y_got.size()))
    foreach (exp_q[i]) if (i < y_got.size())
      `CHK(y_got[i] == exp_q[i], $sformatf("op %s elem %0d: %h != %h", op.name(), i, y_got[i], exp_q[i]))
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int o = 0; o <= 6; o++) begin
      run(alu_op_e'(o), 1'b0, 60);
      run(alu_op_e'(o), 1'b1, 30);
    end
    run(ALU_ADD, 1'b0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
