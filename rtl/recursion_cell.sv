// recursion_cell: cells (2) and (3) of a common function block, the only
// two cells that depend on the transform.
//
// From the row and column bits (r_k, c_k) they choose which quadrant
// matrix A_{r_k c_k} of [T^k] the element falls into:
//   Haar  (Table II):  w = r_k  (lower half uses I^{k-1}),
//                      alpha = -1 when r_k = c_k = 1, else +1.
//   Walsh (Table III): w = 0    (the unit matrix is never used),
//                      alpha = -1 when r_k = c_k = 1, else +1.
// alpha0 is tied to 1 for both, so alpha is never zero. Combinational.
module recursion_cell
  import dsap_pkg::*;
#(
  parameter transform_e KIND = TR_HAAR
) (
  input  logic  r_k,
  input  logic  c_k,
  output logic  w,        // cell (2): switch control
  output ctrl_t alpha     // cell (3): constant multiplier
);
  always_comb begin
    w        = (KIND == TR_HAAR) ? r_k : 1'b0;
    alpha.v1 = r_k & c_k;
    alpha.v0 = 1'b1;
  end
endmodule
