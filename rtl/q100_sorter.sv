// q100_sorter: the Q100 sort tile.
//
// Sorts a table of up to N records ascending on a KEY_W-bit key (the bottom bits of
// each record) with a bitonic sort, as the document specifies. Like any batch
// sorter it first buffers the whole table; then it sorts and sends the records
// out. A table longer than N records cannot be sorted: the extra records are
// dropped and the sticky overflow flag is raised, the exception the document
// proposes so that software can re-plan the query with a partitioner ahead of the
// sorter.
//
// Own choices: the bitonic network is run one compare-and-exchange per cycle over
// the buffer rather than built as a parallel network; it runs over the smallest
// power of two that holds the table, with the empty places treated as larger than
// any key. For n records (M the power of two) sorting takes
// (M/2)*log2(M)*(log2(M)+1)/2 cycles, e.g. 28160 for 1024.
//
// Interface: stream a (records), stream y (sorted records, then the end beat);
// overflow stays high until reset. Timing: records are taken one per cycle; the
// first sorted record leaves after the sort, then one per cycle.
module q100_sorter #(
  parameter int unsigned N     = q100_pkg::SORT_N,
  parameter int unsigned REC_W = q100_pkg::REC_W,
  parameter int unsigned KEY_W = q100_pkg::KEY_W,
  localparam int unsigned LN   = $clog2(N),
  localparam int unsigned CW   = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             a_valid,
  output logic             a_ready,
  input  logic [REC_W-1:0] a_data,
  input  logic             a_eos,
  output logic             y_valid,
  input  logic             y_ready,
  output logic [REC_W-1:0] y_data,
  output logic             y_eos,
  output logic             overflow,
  output logic             sorting
);
  typedef enum logic [1:0] {S_LOAD, S_SORT, S_OUT, S_EOS} sstate_e;

  sstate_e          state_q;
  logic [REC_W-1:0] mem [N];
  logic [N-1:0]     vld;
  logic [CW-1:0]    n_q, oidx_q;
  logic [LN:0]      kl_q, jl_q, ml_q;   // log2 of k, of j, of the sorted size M
  logic [LN-1:0]    p_q;

  // Current pair: i has a zero at bit jl, l = i with that bit set.
  logic [LN-1:0]    i_idx, l_idx;
  logic             up, a_gt_b, swap;
  logic [KEY_W-1:0] ki, kl;
  logic [LN:0]      half;

  always_comb begin
    logic [LN:0] lo_mask;
    lo_mask = (LN+1)'((1 << jl_q) - 1);
    i_idx   = LN'((((LN+1)'(p_q) & ~lo_mask) << 1) | ((LN+1)'(p_q) & lo_mask));
    l_idx   = i_idx | LN'(1 << jl_q);
    up      = ((LN+1)'(i_idx) & ((LN+1)'(1) << kl_q)) == '0;
    ki      = mem[i_idx][KEY_W-1:0];
    kl      = mem[l_idx][KEY_W-1:0];
    // Empty places compare as larger than every key.
    if (!vld[i_idx])      a_gt_b = vld[l_idx];
    else if (!vld[l_idx]) a_gt_b = 1'b0;
    else                  a_gt_b = (ki > kl);
    swap    = up ? a_gt_b : (!a_gt_b && (vld[i_idx] != vld[l_idx] || ki != kl));
    half    = (LN+1)'(1) << (ml_q - 1);
  end

  function automatic logic [LN:0] clog2n(input logic [CW-1:0] n);
    logic [LN:0] r;
    logic        found;
    r     = '0;
    found = 1'b0;
    for (int i = 0; i <= LN; i++) begin
      if (!found && (CW'(1) << i) >= n) begin
        r     = (LN+1)'(i);
        found = 1'b1;
      end
    end
    return r;
  endfunction

  assign a_ready  = (state_q == S_LOAD);
  assign sorting  = (state_q == S_SORT);
  assign y_valid  = (state_q == S_OUT) || (state_q == S_EOS);
  assign y_eos    = (state_q == S_EOS);
  assign y_data   = (state_q == S_OUT) ? mem[oidx_q[LN-1:0]] : '0;

  always_ff @(posedge clk) begin
    if (state_q == S_LOAD && a_valid && !a_eos && n_q < CW'(N))
      mem[n_q[LN-1:0]] <= a_data;
    else if (state_q == S_SORT && swap) begin
      mem[i_idx] <= mem[l_idx];
      mem[l_idx] <= mem[i_idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_LOAD;
      vld      <= '0;
      n_q      <= '0;
      oidx_q   <= '0;
      kl_q     <= '0;
      jl_q     <= '0;
      ml_q     <= '0;
      p_q      <= '0;
      overflow <= 1'b0;
    end else begin
      unique case (state_q)
        S_LOAD: if (a_valid) begin
          if (a_eos) begin
            ml_q <= clog2n(n_q);
            kl_q <= (LN+1)'(1);
            jl_q <= '0;
            p_q  <= '0;
            oidx_q <= '0;
            if (n_q > CW'(1)) state_q <= S_SORT;
            else if (n_q == '0) state_q <= S_EOS;
            else state_q <= S_OUT;
          end else if (n_q < CW'(N)) begin
            vld[n_q[LN-1:0]] <= 1'b1;
            n_q <= n_q + 1'b1;
          end else begin
            overflow <= 1'b1;
          end
        end
        S_SORT: begin
          if (swap) begin
            vld[i_idx] <= vld[l_idx];
            vld[l_idx] <= vld[i_idx];
          end
          if ((LN+1)'(p_q) == half - 1'b1) begin
            p_q <= '0;
            if (jl_q == '0) begin
              if (kl_q == ml_q) state_q <= S_OUT;
              else begin
                kl_q <= kl_q + 1'b1;
                jl_q <= kl_q;
              end
            end else begin
              jl_q <= jl_q - 1'b1;
            end
          end else begin
            p_q <= p_q + 1'b1;
          end
        end
        S_OUT: if (y_ready) begin
          if (oidx_q == n_q - 1'b1) state_q <= S_EOS;
          oidx_q <= oidx_q + 1'b1;
        end
        S_EOS: if (y_ready) begin
          state_q <= S_LOAD;
          n_q     <= '0;
          vld     <= '0;
        end
        default: state_q <= S_LOAD;
      endcase
    end
  end
endmodule
