// tb_q100_stitch: four columns of random byte widths (one may be unused) are
// stitched into records; each record must hold column 0 in its lowest bytes and
// each following column directly above, zero above the last.
`include "tb_q100_common.svh"
module tb_q100_stitch;
  import q100_pkg::*;
  localparam int NIN = STITCH_IN;
  localparam int BW  = $clog2(COL_W/8+1);
  `TB_CLOCK(200000)
  `TB_SRC(c0, COL_W)
  `TB_SRC(c1, COL_W)
  `TB_SRC(c2, COL_W)
  `TB_SRC(c3, COL_W)
  `TB_SNK(y, REC_W)
  logic [BW-1:0] cfg_bytes [NIN];
  logic [NIN-1:0] c_valid, c_ready, c_eos;
  logic [COL_W-1:0] c_data [NIN];
  bit used [NIN];
  always_comb begin
    c_valid = {c3_valid, c2_valid, c1_valid, c0_valid};
    c_eos   = {c3_eos, c2_eos, c1_eos, c0_eos};
    c_data  = '{c0_data, c1_data, c2_data, c3_data};
    {c3_ready, c2_ready, c1_ready, c0_ready} = c_ready;
  end

  q100_stitch dut (.*);

  task automatic run(int n, int w0, int w1, int w2, int w3);
    int wd [NIN];
    logic [REC_W-1:0] exp_q [$];
    wd = '{w0, w1, w2, w3};
    foreach (wd[j]) cfg_bytes[j] = wd[j][BW-1:0];
    c0_q.delete(); c1_q.delete(); c2_q.delete(); c3_q.delete(); y_got.delete(); y_eosn = 0;
    for (int i = 0; i < n; i++) begin
      logic [REC_W-1:0] r;
      int pos;
      r = '0; pos = 0;
      for (int j = 0; j < NIN; j++) begin
        logic [COL_W-1:0] v;
        for (int k = 0; k < COL_W / 32; k++) v[32*k +: 32] = $urandom;
        if (wd[j] < COL_W/8) v = v & ((COL_W'(1) << (8 * wd[j])) - 1);
        case (j) 0: c0_q.push_back(v); 1: c1_q.push_back(v); 2: c2_q.push_back(v); default: c3_q.push_back(v); endcase
        if (wd[j] != 0) begin
          r = r | (REC_W'(v) << (8 * pos));
          pos += wd[j];
        end
      end
      exp_q.push_back(r);
    end
    c0_clr = 1; c1_clr = 1; c2_clr = 1; c3_clr = 1; @(posedge clk);
    #1 c0_clr = 0; c1_clr = 0; c2_clr = 0; c3_clr = 0;
    c0_go = 1; c1_go = 1; c2_go = 1; c3_go = 1;
    wait (y_eosn == 1);
    @(negedge clk); c0_go = 0; c1_go = 0; c2_go = 0; c3_go = 0;
    `CHK(y_got.size() == n, "record count")
    foreach (exp_q[i]) if (i < y_got.size())
      `CHK(y_got[i] == exp_q[i], $sformatf("widths %0d/%0d/%0d/%0d record %0d", w0, w1, w2, w3, i))
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(20, 4, 8, 4, 16); run(20, 32, 32, 32, 32); run(20, 1, 2, 3, 4); run(20, 8, 8, 8, 0);
    repeat (4) run(20, $urandom_range(1, 32), $urandom_range(1, 32), $urandom_range(1, 32), $urandom_range(0, 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
