// unity_cell: cell (1) of a common function block.
//
// Tracks whether element (i, j) lies on the diagonal of the unit matrix
// I^{k-1} of the lower recursion level: i0^k = i0^{k-1} AND NOT(r_k XOR c_k)
// (the XNOR and AND of the unity matrix cell). The unit matrix word handed
// to the switch cell is I = [i1, i0] with i1 tied to 0, so the unit matrix
// only ever selects ADD or NOP. Purely combinational.
module unity_cell (
  input  logic r_k,       // row index bit k
  input  logic c_k,       // column index bit k
  input  logic i0_prev,   // i0^{k-1}: (i, j) on the diagonal of I^{k-1}
  output logic i0_next,   // i0^k passed to the next function block
  output logic i1_prev    // i1^{k-1}, always 0
);
  always_comb begin
    i0_next = i0_prev & ~(r_k ^ c_k);
    i1_prev = 1'b0;
  end
endmodule
