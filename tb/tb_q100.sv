// tb_q100: the Q100 tile array at its default size (the Pareto mix of tiles, six
// inbound and two outbound stream buffers, an all-to-all fabric). Runs the three
// queries of tb_q100_scenario.svh and fails if any result differs from the
// reference or if partitioner stalls, same-partition back-to-back records,
// stream forks or the sorter overflow never happened.
`include "tb_q100_common.svh"
module tb_q100;
  import q100_pkg::*;
  `TB_CLOCK(200000)
  `include "tb_q100_scenario.svh"

  q100 dut (.*);

  initial begin
    qs_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    qs_query_filter(300);
    qs_query_join(40, 80, 20, 50);
    qs_query_overflow(3);
    `CHK(qs_pstall > 0 && qs_pb2b > 0 && qs_fork > 0 && qs_ovf > 0,
         $sformatf("partitioner stalls %0d back-to-back %0d overflow %0d", qs_pstall, qs_pb2b, qs_ovf))
    $display("partitioner stalls=%0d back_to_back=%0d sort_cycles=%0d overflows=%0d", qs_pstall, qs_pb2b, qs_sortcyc, qs_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
