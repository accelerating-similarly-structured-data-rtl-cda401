// q100_stitch: the Q100 column stitcher, the inverse of the column selector.
//
// Takes up to NIN columns and builds table records from them: column 0 goes in the
// lowest bytes, each following column directly above the previous one, using the
// byte widths in cfg_bytes; a width of 0 leaves an input unused. Records are
// REC_W bits, zero-filled above the last column. The document gives the function
// and a maximum total width; the number of inputs and the packing are this
// design's own.
//
// Interface: NIN input column streams (COL_W bits each) consumed together, output
// record stream y. Timing: one record per cycle, registered output.
module q100_stitch #(
  parameter int unsigned NIN   = q100_pkg::STITCH_IN,
  parameter int unsigned COL_W = q100_pkg::COL_W,
  parameter int unsigned REC_W = q100_pkg::REC_W,
  localparam int unsigned BW   = $clog2(COL_W / 8 + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [BW-1:0]    cfg_bytes [NIN],
  input  logic [NIN-1:0]   c_valid,
  output logic [NIN-1:0]   c_ready,
  input  logic [COL_W-1:0] c_data [NIN],
  input  logic [NIN-1:0]   c_eos,
  output logic             y_valid,
  input  logic             y_ready,
  output logic [REC_W-1:0] y_data,
  output logic             y_eos
);
  logic [NIN-1:0]   used;
  logic             all_v, take, any_eos;
  logic [REC_W-1:0] rec;

  always_comb begin
    all_v   = 1'b1;
    any_eos = 1'b0;
    for (int i = 0; i < NIN; i++) begin
      used[i] = (cfg_bytes[i] != '0);
      if (used[i] && !c_valid[i]) all_v = 1'b0;
      if (used[i] && c_eos[i])    any_eos = 1'b1;
    end
  end

  assign take    = all_v && (used != '0) && (!y_valid || y_ready);
  assign c_ready = take ? used : '0;

  always_comb begin
    int unsigned pos;
    logic [COL_W-1:0] m;
    rec = '0;
    pos = 0;
    for (int i = 0; i < NIN; i++) begin
      for (int b = 0; b < COL_W / 8; b++) m[8*b +: 8] = (b < int'(cfg_bytes[i])) ? 8'hFF : 8'h00;
      rec = rec | (REC_W'(c_data[i] & m) << pos);
      pos = pos + 8 * int'(cfg_bytes[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_data  <= '0;
      y_eos   <= 1'b0;
    end else if (take) begin
      y_valid <= 1'b1;
      y_data  <= any_eos ? '0 : rec;
      y_eos   <= any_eos;
    end else if (y_ready) begin
      y_valid <= 1'b0;
    end
  end
endmodule
