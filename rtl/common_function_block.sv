// common_function_block: one recursion step [T^k] of the matrix element
// coprocessor (Fig. 4 arrangement of five cells).
//
// Given the row and column index bits (r_k, c_k), the unit-matrix flag
// i0^{k-1} and the control word t^{k-1} from the block above, it forms
//   t^k = alpha(r_k, c_k) * (w ? I^{k-1} : t^{k-1})
//   i0^k = i0^{k-1} AND (r_k == c_k)
// which is element (i, j) of [T^k] = [A00 A01 ; A10 A11]. The cells are:
// (1) unity_cell, (2)+(3) recursion_cell (transform dependent),
// (4) switch_cell, (5) alpha_mult_cell. Blocks are identical and chained
// N deep, fed r_1/c_1 (LSBs) at the top and r_N/c_N at the bottom.
// Purely combinational; the only parameter picks Haar or Walsh.
module common_function_block
  import dsap_pkg::*;
#(
  parameter transform_e KIND = TR_HAAR
) (
  input  logic  r_k,
  input  logic  c_k,
  input  logic  i0_prev,   // i0^{k-1}
  input  ctrl_t t_prev,    // t^{k-1}
  output logic  i0_next,   // i0^k
  output ctrl_t t_next     // t^k
);
  logic  i1_prev;
  logic  w;
  ctrl_t alpha;
  ctrl_t unity;
  ctrl_t v_mid;

  unity_cell u_unity (
    .r_k, .c_k, .i0_prev, .i0_next, .i1_prev
  );

  recursion_cell #(.KIND(KIND)) u_rec (
    .r_k, .c_k, .w, .alpha
  );

  always_comb begin
    unity.v1 = i1_prev;
    unity.v0 = i0_prev;
  end

  switch_cell u_switch (
    .w, .unity, .t_prev, .v_mid
  );

  alpha_mult_cell u_mult (
    .alpha, .v_mid, .t_next
  );
endmodule
