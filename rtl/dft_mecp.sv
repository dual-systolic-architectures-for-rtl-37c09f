// dft_mecp: matrix element coprocessor of the DFT array (Fig. 11 layout).
//
// Instead of indexes, two vectors cross the array: the control vector a
// (a_j in {0, 1, 2}, moving left to right with the input x) and the root
// vector b (b_i = omega^i, moving right to left with the partial sums y).
// Coefficients are powers of omega, a primitive n-th root of unity, coded
// as an exponent e (N bits) and a nonzero flag, so omega^e * omega^k is an
// N-bit addition. The cell forms
//   f = 0         when a = 0, or a = 1 and b = 0
//   f = 1         when a = 1 and b != 0 (first column, omega^0)
//   f = f_right   when a = 2
// where f_right is the pass register of the right-hand neighbour, and it
// loads f * b into its own pass register for the left-hand neighbour.
// Along a row i the coefficient therefore grows by omega^i per column, so
// the cell where y_i meets x_j holds omega^(i*j).
//
// The a and b registers also carry a frame bit; en tells the IPSP that
// a and b (hence x and y) belong to the same transform, so transforms can
// follow each other back to back. That bit is this design's addition.
// Timing: vector and pass registers load every clock; f_ij and en are
// combinational from the registers and f_right.
module dft_mecp
  import dsap_pkg::*;
#(
  parameter int unsigned N = 2      // log2 of the transform length
) (
  input  logic         clk,
  input  logic         rst,
  input  actrl_e       a_in,        // control word from the left
  input  logic         a_frame_in,
  output actrl_e       a_q,         // control register, to the right
  output logic         a_frame_q,
  input  logic         b_nz_in,     // root from the right: nonzero flag
  input  logic [N-1:0] b_exp_in,    //   and exponent
  input  logic         b_frame_in,
  output logic         b_nz_q,      // root register, to the left
  output logic [N-1:0] b_exp_q,
  output logic         b_frame_q,
  input  logic         f_nz_in,     // pass register of the right neighbour
  input  logic [N-1:0] f_exp_in,
  output logic         f_nz_q,      // pass register, to the left
  output logic [N-1:0] f_exp_q,
  output logic         f_nz,        // coefficient for the IPSP
  output logic [N-1:0] f_exp,
  output logic         en           // same transform
);
  actrl_e     a_reg;
  logic       a_frm, b_nz, b_frm, p_nz;
  logic [N-1:0] b_exp, p_exp;

  always_comb begin
    unique case (a_reg)
      A_FIRST: begin f_nz = b_nz;    f_exp = '0;       end
      A_NEXT:  begin f_nz = f_nz_in; f_exp = f_exp_in; end
      default: begin f_nz = 1'b0;    f_exp = '0;       end
    endcase
    en = (a_frm == b_frm);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_reg <= A_NONE;
      a_frm <= 1'b0;
      b_nz  <= 1'b0;
      b_exp <= '0;
      b_frm <= 1'b0;
      p_nz  <= 1'b0;
      p_exp <= '0;
    end else begin
      a_reg <= a_in;
      a_frm <= a_frame_in;
      b_nz  <= b_nz_in;
      b_exp <= b_exp_in;
      b_frm <= b_frame_in;
      p_nz  <= f_nz & b_nz;          // f * b
      p_exp <= f_exp + b_exp;        // exponents add modulo n
    end
  end

  always_comb begin
    a_q       = a_reg;
    a_frame_q = a_frm;
    b_nz_q    = b_nz;
    b_exp_q   = b_exp;
    b_frame_q = b_frm;
    f_nz_q    = p_nz;
    f_exp_q   = p_exp;
  end
endmodule
