// alpha_mult_cell: cell (5) of a common function block.
//
// Multiplies the intermediate ternary word V' by the constant alpha, coded
// as [alpha1, alpha0] in the same way as a control word:
//   v1^k = alpha1 XOR v1'   (sign flips when alpha is negative)
//   v0^k = alpha0 AND v0'   (zero when alpha is zero)
// Purely combinational.
module alpha_mult_cell
  import dsap_pkg::*;
(
  input  ctrl_t alpha,    // [alpha1, alpha0]
  input  ctrl_t v_mid,    // V'
  output ctrl_t t_next    // t^k
);
  always_comb begin
    t_next.v1 = alpha.v1 ^ v_mid.v1;
    t_next.v0 = alpha.v0 & v_mid.v0;
  end
endmodule
