// Shared testbench helpers for the Q100 tile testbenches.
//
// TB_CLOCK(N)   : clock, active-low reset, check counters, a watchdog of N cycles.
// TB_SRC(P, W)  : a source for stream P (P_valid/P_ready/P_data/P_eos). Fill the
//                 queue P_q, pulse P_clr, set P_go: it sends P_q in order with
//                 random gaps, then one end beat. valid is held until accepted.
// TB_SNK(P, W)  : a sink for stream P with random back-pressure; data beats are
//                 collected in P_got, end beats counted in P_eosn.
// CHK(c, msg)   : count a check and, if c is false, a failure.
`ifndef TB_Q100_COMMON_SVH
`define TB_Q100_COMMON_SVH

`define TB_CLOCK(N) \
  logic clk = 1'b0, rst_n = 1'b0; \
  always #5 clk = ~clk; \
  int checks = 0, failures = 0; \
  initial begin \
    repeat (N) @(posedge clk); \
    failures++; \
    $display("watchdog expired"); \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

`define CHK(c, msg) \
  begin checks++; if (!(c)) begin failures++; $display("FAIL: %s", msg); end end

`define TB_SRC(P, W) \
  logic P``_valid, P``_ready, P``_eos; \
  logic [W-1:0] P``_data; \
  logic [W-1:0] P``_q [$]; \
  int P``_i = 0; \
  logic P``_go = 1'b0, P``_clr = 1'b0, P``_rnd = 1'b0; \
  always_comb begin \
    P``_valid = P``_go && P``_rnd && (P``_i <= P``_q.size()); \
    P``_eos   = (P``_i == P``_q.size()); \
    P``_data  = (P``_i < P``_q.size()) ? P``_q[P``_i] : '0; \
  end \
  always @(posedge clk) \
    if (P``_clr) P``_i <= 0; \
    else if (P``_valid && P``_ready) P``_i <= P``_i + 1; \
  always @(negedge clk) \
    if (!(P``_valid && !P``_ready)) P``_rnd <= ($urandom_range(0, 3) != 0);

`define TB_SNK(P, W) \
  logic P``_valid, P``_ready = 1'b0, P``_eos; \
  logic [W-1:0] P``_data; \
  logic [W-1:0] P``_got [$]; \
  int P``_eosn = 0; \
  always @(negedge clk) P``_ready <= ($urandom_range(0, 3) != 0); \
  always @(posedge clk) \
    if (P``_valid && P``_ready) begin \
      if (P``_eos) P``_eosn++; \
      else P``_got.push_back(P``_data); \
    end

`endif
