// q100_colfilter: the Q100 column filter tile.
//
// Takes a column of booleans (normally from a boolean generator) and a data column
// of the same length, and passes on the data elements whose boolean is true,
// dropping the others (document Sec 6.2). The end-of-stream beat passes through.
//
// Interface: streams b (1-bit booleans) and d (data), output stream y. The two
// inputs are consumed together. Timing: one element per cycle, registered output.
module q100_colfilter #(
  parameter int unsigned W = q100_pkg::COL_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         b_valid,
  output logic         b_ready,
  input  logic         b_data,
  input  logic         b_eos,
  input  logic         d_valid,
  output logic         d_ready,
  input  logic [W-1:0] d_data,
  input  logic         d_eos,
  output logic         y_valid,
  input  logic         y_ready,
  output logic [W-1:0] y_data,
  output logic         y_eos
);
  logic take;

  assign take    = b_valid && d_valid && (!y_valid || y_ready);
  assign b_ready = take;
  assign d_ready = take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_data  <= '0;
      y_eos   <= 1'b0;
    end else if (take) begin
      y_valid <= d_eos || (b_data && !b_eos);
      y_data  <= d_data;
      y_eos   <= d_eos;
    end else if (y_ready) begin
      y_valid <= 1'b0;
    end
  end
endmodule
