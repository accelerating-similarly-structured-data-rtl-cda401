// q100_alu: the Q100 arithmetic and logic tile.
//
// Combines two input columns element by element into one output column: ADD, SUB,
// MUL, DIV, AND, OR, and NOT (of the first column). With use_const set the second
// operand is the constant cfg_const instead of column b, which gives the constant
// multiplication and division the document uses for fixed-point decimals. The
// operation set is the document's; unsigned 64-bit arithmetic, the low 64 bits of
// a product, and a quotient of zero on division by zero are this design's own.
//
// Interface: streams a and b (b is not read when use_const is set), stream y;
// operation and constant are configuration inputs held for the whole stream. The
// end-of-stream beat of a (and of b when used) produces the end beat of y.
// Timing: one element per cycle, result registered one cycle after its inputs.
module q100_alu #(
  parameter int unsigned W = q100_pkg::ALU_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  q100_pkg::alu_op_e cfg_op,
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
  output logic [W-1:0]      y_data,
  output logic              y_eos
);
  logic         take, both;
  logic [W-1:0] opb, res;

  assign both    = a_valid && (cfg_use_const || b_valid);
  assign take    = both && (!y_valid || y_ready);
  assign a_ready = take;
  assign b_ready = take && !cfg_use_const;
  assign opb     = cfg_use_const ? cfg_const : b_data;

  always_comb begin
    unique case (cfg_op)
      q100_pkg::ALU_ADD: res = a_data + opb;
      q100_pkg::ALU_SUB: res = a_data - opb;
      q100_pkg::ALU_MUL: res = a_data * opb;
      q100_pkg::ALU_DIV: res = (opb == '0) ? '0 : a_data / opb;
      q100_pkg::ALU_AND: res = a_data & opb;
      q100_pkg::ALU_OR:  res = a_data | opb;
      q100_pkg::ALU_NOT: res = ~a_data;
      default:           res = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_data  <= '0;
      y_eos   <= 1'b0;
    end else if (take) begin
      y_valid <= 1'b1;
      y_data  <= a_eos ? '0 : res;
      y_eos   <= a_eos;
    end else if (y_ready) begin
      y_valid <= 1'b0;
    end
  end
endmodule
