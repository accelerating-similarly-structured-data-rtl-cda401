// tb_stream_buffer: an inbound and an outbound buffer.
// Inbound: memory pushes (sbload) until full must block, the accelerator pops in
// order; under ctx_hold the accelerator side is shut, save pops every entry in
// order and restore pushes them back, after which the accelerator sees the same
// data as before. Outbound: the reverse roles.
module tb_stream_buffer;
  localparam int W = 64, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  typedef struct {
    logic ctx_hold;
    logic mpush_v, mpop_r, apush_v, apop_r;
    logic [W-1:0] mpush_d, apush_d;
  } drv_t;

  drv_t di, dout;
  logic in_mpush_r, in_mpop_v, in_apush_r, in_apop_v;
  logic [W-1:0] in_mpop_d, in_apop_d;
  logic [3:0] in_count;
  logic o_mpush_r, o_mpop_v, o_apush_r, o_apop_v;
  logic [W-1:0] o_mpop_d, o_apop_d;
  logic [3:0] o_count;

  stream_buffer #(.WIDTH(W), .DEPTH(D), .INBOUND(1'b1)) u_in (
    .clk, .rst_n, .ctx_hold (di.ctx_hold),
    .mem_push_valid (di.mpush_v), .mem_push_ready (in_mpush_r), .mem_push_data (di.mpush_d),
    .mem_pop_valid (in_mpop_v), .mem_pop_ready (di.mpop_r), .mem_pop_data (in_mpop_d),
    .acc_push_valid (di.apush_v), .acc_push_ready (in_apush_r), .acc_push_data (di.apush_d),
    .acc_pop_valid (in_apop_v), .acc_pop_ready (di.apop_r), .acc_pop_data (in_apop_d),
    .count (in_count));
  stream_buffer #(.WIDTH(W), .DEPTH(D), .INBOUND(1'b0)) u_out (
    .clk, .rst_n, .ctx_hold (dout.ctx_hold),
    .mem_push_valid (dout.mpush_v), .mem_push_ready (o_mpush_r), .mem_push_data (dout.mpush_d),
    .mem_pop_valid (o_mpop_v), .mem_pop_ready (dout.mpop_r), .mem_pop_data (o_mpop_d),
    .acc_push_valid (dout.apush_v), .acc_push_ready (o_apush_r), .acc_push_data (dout.apush_d),
    .acc_pop_valid (o_apop_v), .acc_pop_ready (dout.apop_r), .acc_pop_data (o_apop_d),
    .count (o_count));

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [W-1:0] saved [$];
  logic [W-1:0] ref_q [$];

  initial begin
    di = '{default: '0}; dout = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- inbound: fill until full
    for (int i = 0; i < D + 2; i++) begin
      @(negedge clk);
      di.mpush_v = 1; di.mpush_d = {32'hA000_0000 + 32'(i), $urandom};
      chk(in_mpush_r == (i < D), "inbound ready follows full bit");
      chk(!in_mpop_v, "no save pop outside ctx_hold");
      @(posedge clk);
      if (in_mpush_r) ref_q.push_back(di.mpush_d);
    end
    @(negedge clk); di.mpush_v = 0;
    chk(in_count == 4'(D), "count at full");
    // ---- accelerator pops two
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); di.apop_r = 1;
      chk(in_apop_v && in_apop_d == ref_q[0], "accelerator pop order");
      @(posedge clk); void'(ref_q.pop_front());
    end
    @(negedge clk); di.apop_r = 0;
    // ---- sbsave: ctx_hold, pop all to memory
    di.ctx_hold = 1;
    @(negedge clk);
    chk(!in_apop_v, "accelerator side shut under ctx_hold");
    while (in_mpop_v) begin
      di.mpop_r = 1;
      @(posedge clk); saved.push_back(in_mpop_d);
      @(negedge clk);
    end
    di.mpop_r = 0;
    chk(saved.size() == D - 2, "save emptied the buffer");
    chk(in_count == 0, "empty after save");
    // ---- sbrestore
    foreach (saved[i]) begin
      di.mpush_v = 1; di.mpush_d = saved[i];
      @(posedge clk); @(negedge clk);
    end
    di.mpush_v = 0; di.ctx_hold = 0;
    @(negedge clk);
    for (int i = 0; i < D - 2; i++) begin
      di.apop_r = 1;
      chk(in_apop_v && in_apop_d == ref_q[0], "same data after restore");
      @(posedge clk); void'(ref_q.pop_front());
      @(negedge clk);
    end
    di.apop_r = 0;
    chk(!in_apop_v, "empty at end");
    // ---- outbound: accelerator pushes, sbstore pops
    for (int i = 0; i < D + 1; i++) begin
      @(negedge clk);
      dout.apush_v = 1; dout.apush_d = {32'hB000_0000 + 32'(i), $urandom};
      chk(o_apush_r == (i < D), "outbound ready follows full bit");
      chk(!o_mpush_r, "no restore push outside ctx_hold");
      @(posedge clk);
      if (o_apush_r) ref_q.push_back(dout.apush_d);
    end
    @(negedge clk); dout.apush_v = 0;
    chk(!o_apop_v, "outbound has no accelerator pop");
    for (int i = 0; i < D; i++) begin
      dout.mpop_r = 1;
      chk(o_mpop_v && o_mpop_d == ref_q[0], "sbstore order");
      @(posedge clk); void'(ref_q.pop_front());
      @(negedge clk);
    end
    dout.mpop_r = 0;
    chk(!o_mpop_v, "sbstore blocks when empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
