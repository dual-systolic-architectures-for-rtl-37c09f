// mecp: matrix element coprocessor, the upper half of one array cell.
//
// It holds the row index i (moving right to left with the accumulating
// output y) and the column index j (moving left to right with the input x)
// in two registers, and derives the coefficient t_ij of the transform
// matrix from their bits alone. [T^0] = [1] is the initial word
// (i0 = 1, v1 = 0, v0 = 1); N identical common function blocks then apply
// the recursion, block k taking bits r_k and c_k, LSB first. The result is
// the ternary control word t_ij of Table I for the IPSP below.
//
// Each index register is N+1 bits wide. The low N bits are the matrix
// index. The top bit is a frame bit that toggles with each new transform,
// so that successive transforms can follow each other back to back
// through the array: same_frame tells the IPSP whether the y and x it
// holds belong to the same transform. The frame bit is this design's own
// addition ("limited control logic"); the index path follows the document.
//
// Timing: both registers load every clock; t_ij and same_frame are
// combinational from the register outputs.
module mecp
  import dsap_pkg::*;
#(
  parameter transform_e  KIND = TR_HAAR,
  parameter int unsigned N    = 3          // log2 of the matrix order
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N:0]   i_in,       // row index from the right neighbour
  input  logic [N:0]   j_in,       // column index from the left neighbour
  output logic [N:0]   i_q,        // row register, to the left neighbour
  output logic [N:0]   j_q,        // column register, to the right neighbour
  output ctrl_t        t_ij,       // control word for the IPSP
  output logic         same_frame  // i and j belong to the same transform
);
  logic [N:0] row_reg, col_reg;

  always_ff @(posedge clk) begin
    if (rst) begin
      row_reg <= '0;
      col_reg <= '0;
    end else begin
      row_reg <= i_in;
      col_reg <= j_in;
    end
  end

  // Chain of common function blocks: stage 0 is [T^0].
  logic  i0_chain [N+1];
  ctrl_t t_chain  [N+1];

  always_comb begin
    i0_chain[0] = 1'b1;
    t_chain[0]  = CTRL_ADD;
  end

  for (genvar k = 1; k <= N; k++) begin : g_cfb
    common_function_block #(.KIND(KIND)) u_cfb (
      .r_k     (row_reg[k-1]),
      .c_k     (col_reg[k-1]),
      .i0_prev (i0_chain[k-1]),
      .t_prev  (t_chain[k-1]),
      .i0_next (i0_chain[k]),
      .t_next  (t_chain[k])
    );
  end

  always_comb begin
    i_q        = row_reg;
    j_q        = col_reg;
    t_ij       = t_chain[N];
    same_frame = (row_reg[N] == col_reg[N]);
  end
endmodule
