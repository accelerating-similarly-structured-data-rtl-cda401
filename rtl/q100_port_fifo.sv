// q100_port_fifo: two-entry input queue in front of every Q100 tile input.
//
// The interconnect lets one producer feed several consumers. A beat leaves the
// producer only when every consumer has room, and since room here depends only on
// this queue's own count, no combinational path runs from a tile's ready back to
// its producer. Two entries keep one beat per cycle flowing. This queue is part of
// this design's own interconnect; the document leaves the on-chip network open.
//
// Interface: push/room on the interconnect side, valid/ready on the tile side.
// Timing: a beat pushed in one cycle is visible to the tile the next.
module q100_port_fifo #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] push_data,
  output logic         room,
  output logic         valid,
  input  logic         ready,
  output logic [W-1:0] data
);
  logic [W-1:0] e0_q, e1_q;
  logic [1:0]   cnt_q;
  logic         pop;

  assign room  = (cnt_q != 2'd2);
  assign valid = (cnt_q != 2'd0);
  assign data  = e0_q;
  assign pop   = valid && ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= 2'd0;
      e0_q  <= '0;
      e1_q  <= '0;
    end else begin
      unique case ({push, pop})
        2'b10: begin
          if (cnt_q == 2'd0) e0_q <= push_data;
          else               e1_q <= push_data;
          cnt_q <= cnt_q + 2'd1;
        end
        2'b01: begin
          e0_q  <= e1_q;
          cnt_q <= cnt_q - 2'd1;
        end
        2'b11: begin
          if (cnt_q == 2'd1) e0_q <= push_data;
          else begin
            e0_q <= e1_q;
            e1_q <= push_data;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
