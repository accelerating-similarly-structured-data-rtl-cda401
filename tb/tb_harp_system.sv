// tb_harp_system: HARP with its stream buffers and LLC fill routing at the
// baseline size (127 splitters, 255 partitions, 16-byte records in 64-byte
// bursts). Runs the scenario of tb_harp_scenario.svh twice: uniform keys with
// cache traffic and a context switch, then keys that all fall in one partition.
// It fails if any partition's records differ from the reference, if a cache fill
// is misrouted, or if a stall, a same-partition back-to-back burst, a save or a
// restore never happened.
`include "tb_q100_common.svh"
`define HS_NSPLIT harp_pkg::N_SPLITTERS
module tb_harp_system;
  `TB_CLOCK(300000)
  `include "tb_harp_scenario.svh"

  harp_system dut (.*);

  initial begin
    req_valid = 0; req_addr = 0; req_prefetch = 0; req_stream = 0;
    fill_valid = 0; fill_tag = 0; fill_data = 0; sbst_valid = 0; sbst_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    hs_run(600, 40, 0);
    hs_run(150, 10, 1);
    `CHK(hs_stalls > 0 && hs_b2b > 0 && hs_saves > 0 && hs_restores > 0 && hs_llc == 50,
         $sformatf("stalls %0d b2b %0d saves %0d restores %0d cache fills %0d", hs_stalls, hs_b2b, hs_saves, hs_restores, hs_llc))
    $display("stalls=%0d b2b=%0d saves=%0d restores=%0d cache_fills=%0d stores=%0d", hs_stalls, hs_b2b, hs_saves, hs_restores, hs_llc, hs_stores);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
