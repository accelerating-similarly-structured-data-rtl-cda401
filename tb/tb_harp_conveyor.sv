// tb_harp_conveyor: random keys against random ascending splitters; every filed
// record must land in the partition a reference search gives, in input order.
// First phase: no buffer ever full, so the pipe must take one record per cycle.
// Second phase: buffers report full at random, which must stall the pipe.
module tb_harp_conveyor;
  localparam int N = 127, NP = 2*N+1, REC_W = 128, KEY_W = 32, NREC = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic spl_we; logic [6:0] spl_idx; logic [KEY_W-1:0] spl_val;
  logic in_valid, stall, empty;
  logic [REC_W-1:0] in_rec;
  logic [NP-1:0] buf_we, buf_full;
  logic [REC_W-1:0] stage_rec [N];

  harp_conveyor #(.N_SPLIT(N)) dut (.*);

  logic [KEY_W-1:0] spl [N];
  logic [REC_W-1:0] expq [NP][$];
  int sent = 0, filed = 0, stalls = 0, cyc = 0, phase1_end = 0;
  bit phase2 = 0;

  function automatic int ref_part(logic [KEY_W-1:0] k);
    for (int i = 0; i < N; i++) begin
      if (k < spl[i]) return 2*i;
      if (k == spl[i]) return 2*i+1;
    end
    return NP-1;
  endfunction

  function automatic logic [REC_W-1:0] mkrec(int n);
    logic [KEY_W-1:0] k;
    k = ($urandom_range(0,3) == 0) ? spl[$urandom_range(0,N-1)] : KEY_W'($urandom_range(0, 130*1000));
    return {32'(n), $urandom, $urandom, k};
  endfunction

  initial begin
    spl_we = 0; spl_idx = 0; spl_val = 0; in_valid = 0; in_rec = 0; buf_full = 0;
    for (int i = 0; i < N; i++) spl[i] = KEY_W'(1000*i + $urandom_range(0, 999));
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); spl_we = 1; spl_idx = 7'(i); spl_val = spl[i];
    end
    @(negedge clk); spl_we = 0;
    while (sent < NREC) begin
      in_valid = 1; in_rec = mkrec(sent);
      @(posedge clk);
      if (!stall) begin
        expq[ref_part(in_rec[KEY_W-1:0])].push_back(in_rec);
        sent++;
      end
      @(negedge clk);
      if (sent == NREC/2 && !phase2) begin
        in_valid = 0;
        wait (empty);
        @(negedge clk);
        phase2 = 1;
      end
    end
    in_valid = 0;
  end

  always @(negedge clk) buf_full <= phase2 ? NP'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}) & NP'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}) : '0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (stall) stalls++;
    for (int p = 0; p < NP; p++) if (buf_we[p]) begin
      int st;
      st = (p == NP-1) ? N-1 : p/2;
      checks++;
      if (buf_full[p] || expq[p].size() == 0 || stage_rec[st] !== expq[p][0]) begin
        failures++;
        if (failures < 10) $display("bad filing into partition %0d", p);
      end
      if (expq[p].size() != 0) void'(expq[p].pop_front());
      filed++;
      if (filed == NREC/2) phase1_end = cyc;
    end
  end

  int first_cyc;
  initial begin
    wait (spl_we); wait (!spl_we);
    first_cyc = cyc;
    wait (filed == NREC);
    @(posedge clk);
    // Phase 1: NREC/2 records through a N-stage pipe with no stalls.
    checks++;
    if (phase1_end - first_cyc > NREC/2 + N + 2) begin
      failures++;
      $display("rate: %0d records took %0d cycles", NREC/2, phase1_end - first_cyc);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired, filed %0d", filed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
