// q100_aggregator: the Q100 aggregation tile.
//
// Takes a data column and a group-by column, both sorted on the group-by value, and
// produces one (group, result) pair per group. As the document describes, it only
// compares consecutive group-by values: a change of value closes the running
// aggregate, which is sent out, and starts the next one. The operations are the
// document's SQL set: SUM, COUNT, MIN, MAX and AVG (the sum divided by the count,
// truncated). The accumulator width, unsigned values and integer average are this
// design's own choices.
//
// Interface: streams g (group-by) and d (data), consumed together; output streams
// the group on y_group and the result on y_data, with an end beat after the last
// group. Timing: a group's result leaves the cycle after the first element of the
// next group (or the end beat) arrives; at the end of the input the tile spends one
// extra cycle to send the last group before the end beat.
module q100_aggregator #(
  parameter int unsigned W = q100_pkg::COL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  q100_pkg::agg_op_e cfg_op,
  input  logic              g_valid,
  output logic              g_ready,
  input  logic [W-1:0]      g_data,
  input  logic              g_eos,
  input  logic              d_valid,
  output logic              d_ready,
  input  logic [W-1:0]      d_data,
  input  logic              d_eos,
  output logic              y_valid,
  input  logic              y_ready,
  output logic [W-1:0]      y_group,
  output logic [W-1:0]      y_data,
  output logic              y_eos
);
  logic         have_q, eos_pend_q;
  logic [W-1:0] grp_q, sum_q, cnt_q, min_q, max_q;
  logic [W-1:0] result;
  logic         out_free, take, close;

  assign out_free = !y_valid || y_ready;
  assign take     = g_valid && d_valid && out_free && !eos_pend_q;
  assign g_ready  = take;
  assign d_ready  = take;
  // The running group closes on a new group-by value or at the end of the input.
  assign close    = take && have_q && (g_eos || g_data != grp_q);

  always_comb begin
    unique case (cfg_op)
      q100_pkg::AGG_SUM:   result = sum_q;
      q100_pkg::AGG_COUNT: result = cnt_q;
      q100_pkg::AGG_MIN:   result = min_q;
      q100_pkg::AGG_MAX:   result = max_q;
      q100_pkg::AGG_AVG:   result = (cnt_q == '0) ? '0 : sum_q / cnt_q;
      default:             result = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_q     <= 1'b0;
      eos_pend_q <= 1'b0;
      grp_q      <= '0;
      sum_q      <= '0;
      cnt_q      <= '0;
      min_q      <= '0;
      max_q      <= '0;
      y_valid    <= 1'b0;
      y_group    <= '0;
      y_data     <= '0;
      y_eos      <= 1'b0;
    end else begin
      if (y_valid && y_ready) y_valid <= 1'b0;
      if (eos_pend_q && out_free) begin
        // Second beat after the end of the input: the end marker itself.
        eos_pend_q <= 1'b0;
        y_valid    <= 1'b1;
        y_eos      <= 1'b1;
        y_group    <= '0;
        y_data     <= '0;
      end else if (take) begin
        if (close) begin
          y_valid <= 1'b1;
          y_eos   <= 1'b0;
          y_group <= grp_q;
          y_data  <= result;
        end
        if (g_eos) begin
          have_q <= 1'b0;
          if (have_q) begin
            eos_pend_q <= 1'b1;
          end else begin
            y_valid <= 1'b1;
            y_eos   <= 1'b1;
            y_group <= '0;
            y_data  <= '0;
          end
        end else if (!have_q || close) begin
          have_q <= 1'b1;
          grp_q  <= g_data;
          sum_q  <= d_data;
          cnt_q  <= W'(1);
          min_q  <= d_data;
          max_q  <= d_data;
        end else begin
          sum_q <= sum_q + d_data;
          cnt_q <= cnt_q + 1'b1;
          if (d_data < min_q) min_q <= d_data;
          if (d_data > max_q) max_q <= d_data;
        end
      end
    end
  end
endmodule
