// q100_append: the Q100 table appender.
//
// Appends two tables of the same schema: every record of table a is passed on,
// then every record of table b, followed by a single end beat (document Sec 6.2).
// The order (a before b) is this design's own choice.
//
// Interface: streams a and b, output stream y, all W wide. Timing: one record per
// cycle, registered output; the end beat of a is absorbed without a bubble in the
// output beyond one cycle.
module q100_append #(
  parameter int unsigned W = q100_pkg::REC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         a_valid,
  output logic         a_ready,
  input  logic [W-1:0] a_data,
  input  logic         a_eos,
  input  logic         b_valid,
  output logic         b_ready,
  input  logic [W-1:0] b_data,
  input  logic         b_eos,
  output logic         y_valid,
  input  logic         y_ready,
  output logic [W-1:0] y_data,
  output logic         y_eos
);
  logic second_q, out_free;

  assign out_free = !y_valid || y_ready;
  assign a_ready  = out_free && !second_q;
  assign b_ready  = out_free && second_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second_q <= 1'b0;
      y_valid  <= 1'b0;
      y_data   <= '0;
      y_eos    <= 1'b0;
    end else begin
      if (y_valid && y_ready) y_valid <= 1'b0;
      if (a_valid && a_ready) begin
        if (a_eos) begin
          second_q <= 1'b1;
        end else begin
          y_valid <= 1'b1;
          y_data  <= a_data;
          y_eos   <= 1'b0;
        end
      end else if (b_valid && b_ready) begin
        y_valid <= 1'b1;
        y_data  <= b_data;
        y_eos   <= b_eos;
        if (b_eos) second_q <= 1'b0;
      end
    end
  end
endmodule
