// tb_harp: the partitioner at its baseline size (127 splitters, 255 partitions,
// 16-byte records, 64-byte bursts).
// Run 1: uniformly spread keys. Every record must come out once, in a burst of
// its own partition (checked against a reference search), records of a partition
// in input order, and the input must flow at close to one record per cycle.
// Run 2: every key equal (worst skew). The merge needs RECS+1 cycles per burst,
// so the input rate drops to RECS/(RECS+1) records per cycle.
module tb_harp;
  localparam int N = 127, NP = 255, REC_W = 128, KEY_W = 32, RECS = 4;
  localparam int NB1 = 1000, NB2 = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic spl_we, partition_start, partition_stop, running, done;
  logic [6:0] spl_idx; logic [KEY_W-1:0] spl_val;
  logic in_valid, in_ready, out_valid, out_ready, conv_stall, merge_b2b;
  logic [RECS*REC_W-1:0] in_burst, out_burst;
  logic [7:0] out_part; logic [2:0] out_nrec;

  harp dut (.*);

  logic [KEY_W-1:0] spl [N];
  logic [REC_W-1:0] expq [NP][$];
  int nin = 0, nout = 0, cyc = 0, b2b = 0, stalls = 0;

  function automatic int ref_part(logic [KEY_W-1:0] k);
    for (int i = 0; i < N; i++) begin
      if (k < spl[i]) return 2*i;
      if (k == spl[i]) return 2*i+1;
    end
    return NP-1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (merge_b2b) b2b++;
    if (conv_stall) stalls++;
    if (in_valid && in_ready) begin
      for (int r = 0; r < RECS; r++) begin
        logic [REC_W-1:0] rec;
        rec = in_burst[r*REC_W +: REC_W];
        expq[ref_part(rec[KEY_W-1:0])].push_back(rec);
      end
      nin += RECS;
    end
    if (out_valid && out_ready) begin
      for (int r = 0; r < int'(out_nrec); r++) begin
        logic [REC_W-1:0] rec;
        rec = out_burst[r*REC_W +: REC_W];
        checks++;
        if (expq[out_part].size() == 0 || rec !== expq[out_part][0]) begin
          failures++;
          if (failures < 10) $display("wrong record in burst for partition %0d", out_part);
        end
        if (expq[out_part].size() != 0) void'(expq[out_part].pop_front());
        nout++;
      end
    end
  end

  task automatic run(int nb, bit skew, output int in_cycles);
    int c0, target;
    logic [KEY_W-1:0] k;
    target = nin + nb*RECS;
    @(negedge clk); partition_start = 1;
    @(negedge clk); partition_start = 0;
    c0 = cyc;
    for (int b = 0; b < nb; b++) begin
      for (int r = 0; r < RECS; r++) begin
        if (skew) k = spl[60];
        else if ($urandom_range(0, 9) == 0) k = spl[$urandom_range(0, N-1)];
        else k = KEY_W'($urandom_range(0, 128*1000));
        in_burst[r*REC_W +: REC_W] = {32'(b), $urandom, $urandom, k};
      end
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    in_cycles = cyc - c0;
    wait (nin == target);
    @(negedge clk); partition_stop = 1;
    @(negedge clk); partition_stop = 0;
    while (!done) @(posedge clk);
    @(negedge clk);
  endtask

  int c1, c2;
  initial begin
    spl_we = 0; spl_idx = 0; spl_val = 0; partition_start = 0; partition_stop = 0;
    in_valid = 0; in_burst = 0; out_ready = 1;
    for (int i = 0; i < N; i++) spl[i] = KEY_W'(1000*i + $urandom_range(0, 999));
    repeat (2) @(posedge clk);
    rst_n = 1;
    // set_splitter, once per splitter
    for (int i = 0; i < N; i++) begin
      @(negedge clk); spl_we = 1; spl_idx = 7'(i); spl_val = spl[i];
    end
    @(negedge clk); spl_we = 0;

    run(NB1, 0, c1);
    $display("uniform: %0d records in %0d cycles", NB1*RECS, c1);
    checks++;
    if (real'(c1) / real'(NB1*RECS) > 1.05) begin failures++; $display("uniform rate too low"); end

    run(NB2, 1, c2);
    $display("skewed: %0d records in %0d cycles", NB2*RECS, c2);
    checks++;
    if (real'(c2) / real'(NB2*RECS) < 1.15 || real'(c2) / real'(NB2*RECS) > 1.35) begin
      failures++; $display("skewed rate not near (RECS+1)/RECS");
    end

    checks++;
    if (nout != nin) begin failures++; $display("records in %0d out %0d", nin, nout); end
    checks++;
    if (b2b == 0) begin failures++; $display("no back-to-back burst seen"); end
    checks++;
    if (stalls == 0) begin failures++; $display("no conveyor stall seen"); end
    checks++;
    if (running) begin failures++; $display("still running after stop"); end
    $display("b2b=%0d stalls=%0d", b2b, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired: in %0d out %0d", nin, nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
