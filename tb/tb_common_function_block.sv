// tb_common_function_block: exhaustive test of one recursion step for the
// Haar and the Walsh rule. For every r_k, c_k, i0^{k-1} and every
// control word t^{k-1} it checks the ternary value of t^k against the
// quadrant rule of the recursion (Haar: upper half passes T^{k-1}, lower
// half gives +/-I^{k-1}; Walsh: T^{k-1}, negated in the lower-right
// quadrant) and checks i0^k against the diagonal rule.
module tb_common_function_block;
  import dsap_pkg::*;

  logic  r_k, c_k, i0_prev;
  ctrl_t t_prev;
  logic  i0_h, i0_w;
  ctrl_t t_h, t_w;

  common_function_block #(.KIND(TR_HAAR)) u_haar (
    .r_k, .c_k, .i0_prev, .t_prev, .i0_next(i0_h), .t_next(t_h)
  );
  common_function_block #(.KIND(TR_WALSH)) u_walsh (
    .r_k, .c_k, .i0_prev, .t_prev, .i0_next(i0_w), .t_next(t_w)
  );

  int checks = 0, failures = 0;

  // Table I decoding, written out independently of the design package
  function automatic int val(logic [1:0] v);
    if (v[0] == 1'b0) return 0;
    return v[1] ? -1 : 1;
  endfunction

  initial begin
    for (int k = 0; k < 32; k++) begin
      automatic int exp_h, exp_w, tv;
      automatic bit exp_i0;
      {r_k, c_k, i0_prev, t_prev} = 5'(k);
      #1;
      tv     = val(t_prev);
      exp_i0 = i0_prev && (r_k == c_k);
      exp_h  = !r_k ? tv : (i0_prev ? (c_k ? -1 : 1) : 0);
      exp_w  = (r_k && c_k) ? -tv : tv;
      checks += 4;
      if (val(t_h) != exp_h) begin
        failures++;
        $display("FAIL haar r=%0d c=%0d i0=%0d t=%0d: got %0d expected %0d",
                 r_k, c_k, i0_prev, tv, val(t_h), exp_h);
      end
      if (val(t_w) != exp_w) begin
        failures++;
        $display("FAIL walsh r=%0d c=%0d t=%0d: got %0d expected %0d",
                 r_k, c_k, tv, val(t_w), exp_w);
      end
      if (i0_h != exp_i0 || i0_w != exp_i0) begin
        failures++;
        $display("FAIL unity r=%0d c=%0d i0=%0d: got %0d/%0d", r_k, c_k, i0_prev, i0_h, i0_w);
      end
      // Walsh words never carry a zero once started from a nonzero word
      if (t_prev[0] && !t_w.v0) begin
        failures++;
        $display("FAIL walsh produced a zero coefficient");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
