// q100_joiner: the Q100 join tile, an inner equi-join of two tables.
//
// One input table carries a primary key (each key at most once), the other a
// foreign key. The document gives only this function; the method here is this
// design's own: both tables must arrive sorted ascending on their key (as the
// aggregator requires of its input), and the tile merges them. When the primary
// key is smaller, that record is dropped; when the foreign key is smaller, that
// record is dropped; on equal keys the joined record is sent and the foreign-key
// record is dropped, so several foreign records can match one primary record.
//
// Keys are the KEY_W bits at the bottom of each record. A joined record is the
// low half of the foreign-key record above the low half of the primary-key record
// (own choice), so the primary key sits at bit 0 and the foreign key at bit
// REC_W/2.
//
// Interface: streams p (primary table), f (foreign table), output y; all REC_W
// wide. Timing: one comparison per cycle, registered output.
module q100_joiner #(
  parameter int unsigned REC_W = q100_pkg::REC_W,
  parameter int unsigned KEY_W = q100_pkg::KEY_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             p_valid,
  output logic             p_ready,
  input  logic [REC_W-1:0] p_data,
  input  logic             p_eos,
  input  logic             f_valid,
  output logic             f_ready,
  input  logic [REC_W-1:0] f_data,
  input  logic             f_eos,
  output logic             y_valid,
  input  logic             y_ready,
  output logic [REC_W-1:0] y_data,
  output logic             y_eos
);
  localparam int unsigned H = REC_W / 2;

  logic             out_free, both, match, done;
  logic [KEY_W-1:0] pk, fk;

  assign out_free = !y_valid || y_ready;
  assign pk       = p_data[KEY_W-1:0];
  assign fk       = f_data[KEY_W-1:0];
  assign both     = p_valid && f_valid && !p_eos && !f_eos;
  assign match    = both && (pk == fk);
  assign done     = p_valid && f_valid && p_eos && f_eos;

  always_comb begin
    p_ready = 1'b0;
    f_ready = 1'b0;
    if (out_free) begin
      if (done) begin
        p_ready = 1'b1;
        f_ready = 1'b1;
      end else if (both) begin
        if (pk < fk)      p_ready = 1'b1;
        else              f_ready = 1'b1;
      end else if (p_valid && f_valid && p_eos) begin
        f_ready = 1'b1;          // no more primary records: drop the rest
      end else if (p_valid && f_valid && f_eos) begin
        p_ready = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_data  <= '0;
      y_eos   <= 1'b0;
    end else if (out_free) begin
      y_valid <= match || done;
      y_eos   <= done;
      y_data  <= done ? '0 : {f_data[H-1:0], p_data[H-1:0]};
    end
  end
endmodule
