// q100_concat: the Q100 column concatenator.
//
// Joins corresponding elements of two columns into one element, so that a later
// sort or partition can work on two attributes at once (document Sec 6.2). Column
// a is placed above column b: y = (a << 8*cfg_b_bytes) | b, truncated to W bits,
// where cfg_b_bytes is the byte width of column b (own choice of layout).
//
// Interface: streams a and b consumed together, stream y. Timing: one element per
// cycle, registered output.
module q100_concat #(
  parameter int unsigned W  = q100_pkg::COL_W,
  localparam int unsigned BW = $clog2(W / 8 + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [BW-1:0] cfg_b_bytes,
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
  logic take;

  assign take    = a_valid && b_valid && (!y_valid || y_ready);
  assign a_ready = take;
  assign b_ready = take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_data  <= '0;
      y_eos   <= 1'b0;
    end else if (take) begin
      y_valid <= 1'b1;
      y_data  <= (a_eos || b_eos) ? '0 : ((a_data << {cfg_b_bytes, 3'b000}) | b_data);
      y_eos   <= a_eos || b_eos;
    end else if (y_ready) begin
      y_valid <= 1'b0;
    end
  end
endmodule
