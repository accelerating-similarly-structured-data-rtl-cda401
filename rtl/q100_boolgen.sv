// q100_boolgen: the Q100 boolean generator tile.
//
// Compares each element of column a with either a constant or the matching
// element of column b and produces a column of booleans. As in the document, two
// comparators (less-than and equal) serve all six SQL comparisons: EQ, NEQ, LT,
// LTE, GT and GTE are formed from their two results. Values compare as unsigned
// numbers (own choice).
//
// Interface: streams a and b (b unused with cfg_use_const), output stream y with a
// 1-bit element. Timing: one element per cycle, registered output.
module q100_boolgen #(
  parameter int unsigned W = q100_pkg::COL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  q100_pkg::cmp_op_e cfg_op,
  input  logic              cfg_use_const,
  input  logic [W-1:0]      cfg_const,
  input  logic              a_valid,
  output logic              a_ready,
  input  logic [W-1:0]      a_data,
  input  logic              a_eos,
  input  logic              b_valid,
  output logic              b_ready,
  input  logic [W-1:0]      b_data,
  input  logic              b_eos,
  output logic              y_valid,
  input  logic              y_ready,
  output logic              y_data,
  output logic              y_eos
);
  logic         take, lt, eq, res;
  logic [W-1:0] opb;

  assign opb     = cfg_use_const ? cfg_const : b_data;
  assign take    = a_valid && (cfg_use_const || b_valid) && (!y_valid || y_ready);
  assign a_ready = take;
  assign b_ready = take && !cfg_use_const;

  // The two comparators.
  assign lt = (a_data < opb);
  assign eq = (a_data == opb);

  always_comb begin
    unique case (cfg_op)
      q100_pkg::CMP_EQ:  res = eq;
      q100_pkg::CMP_NEQ: res = !eq;
      q100_pkg::CMP_LT:  res = lt;
      q100_pkg::CMP_LTE: res = lt || eq;
      q100_pkg::CMP_GT:  res = !(lt || eq);
      q100_pkg::CMP_GTE: res = !lt;
      default:           res = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_data  <= 1'b0;
      y_eos   <= 1'b0;
    end else if (take) begin
      y_valid <= 1'b1;
      y_data  <= !a_eos && res;
      y_eos   <= a_eos;
    end else if (y_ready) begin
      y_valid <= 1'b0;
    end
  end
endmodule
