// tb_harp_serializer: checks that bursts come out as records in order, one per
// cycle when nothing stalls, and that a stall holds the current record.
module tb_harp_serializer;
  localparam int REC_W = 128, RECS = 4, NB = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic pull_en, in_valid, in_ready, stall, out_valid, busy;
  logic [RECS*REC_W-1:0] in_burst;
  logic [REC_W-1:0] out_rec;

  harp_serializer #(.REC_W(REC_W), .RECS(RECS)) dut (.*);

  logic [REC_W-1:0] exp_q [$];
  logic [RECS*REC_W-1:0] bursts [NB];
  int sent = 0, got = 0, first_cyc = -1, last_cyc = 0, cyc = 0, phase = 0;

  always @(posedge clk) cyc++;

  initial begin
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < RECS; r++) bursts[b][r*REC_W +: REC_W] = {$urandom, $urandom, $urandom, 32'(b*RECS+r)};
    pull_en = 1; in_valid = 0; stall = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // Producer: first half back to back, second half with gaps and stalls.
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      for (int r = 0; r < RECS; r++) exp_q.push_back(in_burst[r*REC_W +: REC_W]);
      sent++;
    end
  end
  always @(negedge clk) if (rst_n) begin
    if (!(in_valid && !in_ready)) begin
      if (sent + (in_valid && in_ready) < NB) begin
        in_valid <= (sent < NB/2) ? 1'b1 : ($urandom_range(0,2) != 0);
      end else in_valid <= 0;
    end
    stall <= (got >= NB*RECS/2) ? ($urandom_range(0,3) == 0) : 1'b0;
  end
  // keep in_burst consistent with the next burst to send
  always_comb in_burst = bursts[(sent < NB) ? sent : 0];

  always @(posedge clk) if (rst_n && out_valid && !stall) begin
    checks++;
    if (exp_q.size() == 0 || out_rec !== exp_q[0]) begin
      failures++;
      $display("mismatch at record %0d", got);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
    if (first_cyc < 0) first_cyc = cyc;
    got++;
    if (got == NB*RECS/2) last_cyc = cyc;
  end

  initial begin
    wait (got == NB*RECS);
    @(posedge clk);
    // First half ran without gaps or stalls: one record per cycle.
    checks++;
    if (last_cyc - first_cyc != NB*RECS/2 - 1) begin
      failures++;
      $display("rate: %0d records took %0d cycles", NB*RECS/2, last_cyc - first_cyc + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
