// q100_colselect: the Q100 column selector.
//
// Extracts one column from a table: each REC_W-bit record passes through as the
// cfg_bytes bytes starting at byte cfg_offset, placed at the bottom of a COL_W-bit
// output element and zero-extended (document Sec 6.2 gives the function; byte
// offsets and zero extension are this design's own).
//
// Interface: stream a (records), stream y (column elements); cfg_offset and
// cfg_bytes (1..COL_W/8) are held for the whole stream. Timing: one record per
// cycle, registered output.
module q100_colselect #(
  parameter int unsigned REC_W = q100_pkg::REC_W,
  parameter int unsigned COL_W = q100_pkg::COL_W,
  localparam int unsigned OW   = $clog2(REC_W / 8),
  localparam int unsigned BW   = $clog2(COL_W / 8 + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [OW-1:0]    cfg_offset,
  input  logic [BW-1:0]    cfg_bytes,
  input  logic             a_valid,
  output logic             a_ready,
  input  logic [REC_W-1:0] a_data,
  input  logic             a_eos,
  output logic             y_valid,
  input  logic             y_ready,
  output logic [COL_W-1:0] y_data,
  output logic             y_eos
);
  logic [REC_W-1:0] shifted;
  logic [COL_W-1:0] mask;

  assign shifted = a_data >> {cfg_offset, 3'b000};
  always_comb begin
    for (int b = 0; b < COL_W / 8; b++) mask[8*b +: 8] = (b < int'(cfg_bytes)) ? 8'hFF : 8'h00;
  end
  assign a_ready = !y_valid || y_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_data  <= '0;
      y_eos   <= 1'b0;
    end else if (a_ready) begin
      y_valid <= a_valid;
      y_data  <= a_eos ? '0 : (shifted[COL_W-1:0] & mask);
      y_eos   <= a_eos;
    end
  end
endmodule
