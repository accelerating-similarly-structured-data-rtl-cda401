// tb_harp_merge: the merge unit fed by model partition buffers.
// Checks: each burst holds the records of one partition in order; the fullest
// buffer is chosen; bursts to alternating partitions leave every RECS cycles,
// back-to-back bursts to one partition every RECS+1 cycles; flush sends short
// bursts.
module tb_harp_merge;
  localparam int NP = 15, REC_W = 128, RECS = 4, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flush, out_valid, out_ready, same_b2b, idle;
  logic [3:0] count [NP];
  logic [REC_W-1:0] head [NP];
  logic [NP-1:0] rd;
  logic [RECS*REC_W-1:0] out_burst;
  logic [3:0] out_part;
  logic [2:0] out_nrec;

  harp_merge #(.NP(NP), .REC_W(REC_W), .RECS(RECS), .DEPTH(DEPTH)) dut (.*);

  logic [REC_W-1:0] q [NP][$];
  logic [REC_W-1:0] ref_q [NP][$];
  int bursts = 0, b2b = 0, cyc = 0;
  int burst_cyc [$];
  int burst_part [$];

  always_comb for (int p = 0; p < NP; p++) begin
    count[p] = 4'(q[p].size());
    head[p]  = (q[p].size() != 0) ? q[p][0] : '0;
  end

  task automatic add(int p, int n);
    for (int i = 0; i < n; i++) begin
      logic [REC_W-1:0] r;
      r = {$urandom, $urandom, $urandom, 32'(p)};
      q[p].push_back(r);
      ref_q[p].push_back(r);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (same_b2b) b2b++;
    for (int p = 0; p < NP; p++) if (rd[p]) begin
      if (q[p].size() == 0) begin failures++; $display("read of empty buffer %0d", p); end
      else void'(q[p].pop_front());
    end
    if (out_valid && out_ready) begin
      bursts++;
      burst_cyc.push_back(cyc);
      burst_part.push_back(int'(out_part));
      for (int i = 0; i < int'(out_nrec); i++) begin
        checks++;
        if (ref_q[out_part].size() == 0 || out_burst[i*REC_W +: REC_W] !== ref_q[out_part][0]) begin
          failures++; $display("burst %0d record %0d wrong", bursts, i);
        end
        if (ref_q[out_part].size() != 0) void'(ref_q[out_part].pop_front());
      end
      checks++;
      if (!flush && out_nrec != 3'(RECS)) begin failures++; $display("short burst without flush"); end
    end
  end

  task automatic wait_bursts(int n);
    int target = bursts + n;
    while (bursts < target) @(posedge clk);
  endtask

  initial begin
    flush = 0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Fullest first: partition 5 holds 7, partition 2 holds 5.
    @(negedge clk); add(2, 5); add(5, 7);
    wait_bursts(1);
    checks++;
    if (burst_part[0] != 5) begin failures++; $display("fullest buffer not chosen first"); end
    wait_bursts(1);
    repeat (3) @(negedge clk);
    // Alternating partitions: 8 records each in 3 and 4 -> 4 bursts, RECS cycles apart.
    burst_cyc.delete(); burst_part.delete();
    add(3, 8); add(4, 8);
    wait_bursts(4);
    for (int i = 1; i < 4; i++) begin
      checks++;
      if (burst_part[i] == burst_part[i-1]) begin
        if (burst_cyc[i] - burst_cyc[i-1] != RECS+1) begin failures++; $display("same-partition gap %0d", burst_cyc[i]-burst_cyc[i-1]); end
      end else if (burst_cyc[i] - burst_cyc[i-1] != RECS) begin
        failures++; $display("alternating gap %0d", burst_cyc[i]-burst_cyc[i-1]);
      end
    end
    repeat (3) @(negedge clk);
    // Skew: one partition only -> RECS+1 cycles per burst.
    burst_cyc.delete(); burst_part.delete();
    add(9, 8);
    fork
      begin
        for (int i = 0; i < 6; i++) begin
          @(negedge clk);
          while (q[9].size() > 4) @(negedge clk);
          add(9, 4);
        end
      end
    join_none
    wait_bursts(6);
    for (int i = 1; i < 6; i++) begin
      checks++;
      if (burst_cyc[i] - burst_cyc[i-1] != RECS+1) begin failures++; $display("skew gap %0d", burst_cyc[i]-burst_cyc[i-1]); end
    end
    wait_bursts(2);
    // Flush: leftovers of 1..3 records go out as short bursts.
    repeat (10) @(negedge clk);
    add(0, 3); add(7, 1); add(14, 2);
    flush = 1;
    // Back-pressure while flushing.
    fork forever begin @(negedge clk); out_ready = ($urandom_range(0,1) == 1); end join_none
    repeat (200) @(negedge clk);
    checks++;
    for (int p = 0; p < NP; p++) if (ref_q[p].size() != 0 || q[p].size() != 0) begin
      failures++; $display("partition %0d not drained", p);
    end
    checks++;
    if (!idle) begin failures++; $display("not idle at end"); end
    checks++;
    if (b2b == 0) begin failures++; $display("no back-to-back event"); end
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
