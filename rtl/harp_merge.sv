// harp_merge: gathers records of one partition into an output burst.
//
// The merge unit watches the record counts of all partition buffers. It picks the
// fullest buffer that holds at least a burst of RECS records (lowest partition
// number on a tie), reads that burst out one record per cycle and hands it to the
// outbound stream together with the partition number. While draining
// (flush = 1), a buffer with fewer records also qualifies and is sent as a short
// burst, with out_nrec giving the number of valid records.
//
// The choice of the next buffer is made during the last read of the current burst,
// when the count of the buffer being read is not yet up to date, so that buffer is
// left out of that choice. If no other buffer qualifies, one extra cycle is spent
// choosing again with fresh counts. So bursts to different partitions follow each
// other every RECS cycles, while back-to-back bursts to the same partition take
// RECS+1 cycles: the document's skew behaviour (B versus B+1 cycles per burst).
// The document gives this behaviour and the fullest-buffer rule; the selection
// circuit and the output register are this design's own.
//
// Interface: counts/heads of the NP buffers in, a read strobe per buffer out;
// out_valid/out_ready burst handshake with out_part and out_nrec. same_b2b pulses
// when the extra cycle for a back-to-back burst is spent; idle is high when no
// burst is being read or waiting in the output register.
module harp_merge #(
  parameter int unsigned NP    = harp_pkg::N_PARTS,
  parameter int unsigned REC_W = harp_pkg::REC_W,
  parameter int unsigned RECS  = harp_pkg::RECS_PER_BURST,
  parameter int unsigned DEPTH = harp_pkg::PB_DEPTH,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned PW   = (NP > 1) ? $clog2(NP) : 1,
  localparam int unsigned NW   = $clog2(RECS + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  flush,
  input  logic [CW-1:0]         count [NP],
  input  logic [REC_W-1:0]      head  [NP],
  output logic [NP-1:0]         rd,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [RECS*REC_W-1:0] out_burst,
  output logic [PW-1:0]         out_part,
  output logic [NW-1:0]         out_nrec,
  output logic                  same_b2b,
  output logic                  idle
);
  typedef enum logic {M_SELECT, M_DRAIN} mstate_e;

  mstate_e               state_q;
  logic [PW-1:0]         cur_q, last_q;
  logic [NW-1:0]         n_q, idx_q;
  logic                  after_drain_q;
  logic [RECS*REC_W-1:0] asm_q;

  // Fullest qualifying buffer, optionally leaving one out.
  function automatic void pick(input logic [CW-1:0] c [NP], input logic use_excl,
                               input logic [PW-1:0] excl, input logic fl,
                               output logic found, output logic [PW-1:0] sel,
                               output logic [CW-1:0] selc);
    found = 1'b0;
    sel   = '0;
    selc  = '0;
    for (int p = 0; p < NP; p++) begin
      if ((c[p] >= CW'(RECS) || (fl && c[p] != '0)) &&
          !(use_excl && excl == PW'(p)) && (!found || c[p] > selc)) begin
        found = 1'b1;
        sel   = PW'(p);
        selc  = c[p];
      end
    end
  endfunction

  logic          f_all, f_excl;
  logic [PW-1:0] s_all, s_excl;
  logic [CW-1:0] c_all, c_excl;
  logic          out_free, last_rd, do_rd;

  always_comb begin
    pick(count, 1'b0, '0,    flush, f_all,  s_all,  c_all);
    pick(count, 1'b1, cur_q, flush, f_excl, s_excl, c_excl);
  end

  function automatic logic [NW-1:0] burst_len(input logic [CW-1:0] c);
    return (c >= CW'(RECS)) ? NW'(RECS) : NW'(c);
  endfunction

  assign out_free = !out_valid || out_ready;
  assign last_rd  = (idx_q == n_q - 1'b1);
  // The final record of a burst is only read when the output register can take it.
  assign do_rd    = (state_q == M_DRAIN) && (!last_rd || out_free);

  always_comb begin
    rd = '0;
    if (do_rd) rd[cur_q] = 1'b1;
  end

  assign same_b2b = (state_q == M_SELECT) && after_drain_q && f_all && (s_all == last_q);
  assign idle     = (state_q == M_SELECT) && !out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= M_SELECT;
      cur_q         <= '0;
      last_q        <= '0;
      n_q           <= '0;
      idx_q         <= '0;
      after_drain_q <= 1'b0;
      asm_q         <= '0;
      out_valid     <= 1'b0;
      out_burst     <= '0;
      out_part      <= '0;
      out_nrec      <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      case (state_q)
        M_SELECT: begin
          after_drain_q <= 1'b0;
          if (f_all) begin
            state_q <= M_DRAIN;
            cur_q   <= s_all;
            n_q     <= burst_len(c_all);
            idx_q   <= '0;
            asm_q   <= '0;
          end
        end
        M_DRAIN: begin
          if (do_rd) begin
            asm_q[idx_q*REC_W +: REC_W] <= head[cur_q];
            idx_q <= idx_q + 1'b1;
            if (last_rd) begin
              out_valid <= 1'b1;
              out_burst <= asm_q;
              out_burst[idx_q*REC_W +: REC_W] <= head[cur_q];
              out_part  <= cur_q;
              out_nrec  <= n_q;
              last_q    <= cur_q;
              idx_q     <= '0;
              asm_q     <= '0;
              if (f_excl) begin
                cur_q <= s_excl;
                n_q   <= burst_len(c_excl);
              end else begin
                state_q       <= M_SELECT;
                after_drain_q <= 1'b1;
              end
            end
          end
        end
        default: state_q <= M_SELECT;
      endcase
    end
  end
endmodule
