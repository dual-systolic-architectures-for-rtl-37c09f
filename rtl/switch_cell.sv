// switch_cell: cell (4) of a common function block.
//
// Selects either the unit matrix word I^{k-1} = [i1, i0] (w = 1) or the
// control word t^{k-1} = [v1, v0] of the previous block (w = 0) as the
// intermediate word V' = [v1', v0']. In the original circuit this is four
// pass transistors driven by w and its complement; here it is a 2:1
// multiplexer. Purely combinational.
module switch_cell
  import dsap_pkg::*;
(
  input  logic  w,        // 1: take the unit matrix word, 0: take t^{k-1}
  input  ctrl_t unity,    // I^{k-1}
  input  ctrl_t t_prev,   // t^{k-1}
  output ctrl_t v_mid     // V'
);
  always_comb v_mid = w ? unity : t_prev;
endmodule
