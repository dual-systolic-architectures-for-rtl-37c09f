// dsap_ref_pkg: reference model for the testbenches.
//
// coef() returns element (i, j), counted from 0, of the order-2^N Haar or
// Walsh matrix straight from the block recursions
//   [H^k] = [H^{k-1} H^{k-1} ; I^{k-1} -I^{k-1}],  [H^0] = [1]
//   [W^k] = [W^{k-1} W^{k-1} ; W^{k-1} -W^{k-1}],  [W^0] = [1]
// by descending into the quadrant holding (i, j). It shares no logic with
// the bit-level coefficient generator it is used to check.
package dsap_ref_pkg;
  function automatic int coef(bit walsh, int n_log, int i, int j);
    int half;
    bit lower, right;
    if (n_log == 0) return 1;
    half  = 1 << (n_log - 1);
    lower = (i >= half);
    right = (j >= half);
    if (walsh) begin
      return ((lower && right) ? -1 : 1) * coef(walsh, n_log - 1, i % half, j % half);
    end
    if (!lower) return coef(walsh, n_log - 1, i % half, j % half);
    return ((i % half) == (j % half)) ? (right ? -1 : 1) : 0;
  endfunction
endpackage
