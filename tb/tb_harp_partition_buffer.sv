// tb_harp_partition_buffer: random writes and reads against a queue model;
// checks head data, count and full on every cycle.
module tb_harp_partition_buffer;
  localparam int REC_W = 128, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we, rd, full;
  logic [REC_W-1:0] wdata, rdata;
  logic [3:0] count;

  harp_partition_buffer #(.REC_W(REC_W), .DEPTH(DEPTH)) dut (.*);

  logic [REC_W-1:0] q [$];
  int fulls = 0;

  initial begin
    we = 0; rd = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      checks++;
      if (count != 4'(q.size()) || full != (q.size() == DEPTH) || (q.size() != 0 && rdata !== q[0])) begin
        failures++;
        if (failures < 10) $display("state mismatch at %0d: count %0d model %0d", n, count, q.size());
      end
      if (full) fulls++;
      // Bias towards filling in the first half and emptying in the second.
      we = !full && ($urandom_range(0, 99) < ((n % 400) < 200 ? 70 : 30));
      rd = (q.size() != 0) && ($urandom_range(0, 99) < ((n % 400) < 200 ? 30 : 70));
      wdata = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (rd) void'(q.pop_front());
      if (we) q.push_back(wdata);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
