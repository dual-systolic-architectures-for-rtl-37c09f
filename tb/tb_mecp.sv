// tb_mecp: matrix element coprocessor test.
//
// First checks the reference recursion against the Haar matrix of order 8
// and the Walsh matrix of order 8 as printed element by element. Then
// drives every (i, j) into a Haar coprocessor with N = 3 and a Walsh one
// with N = 4, with random frame bits, and checks one clock later that
// t_ij equals the reference element, that the index registers hold and
// pass on i and j, and that same_frame compares the frame bits.
module tb_mecp;
  import dsap_pkg::*;
  import dsap_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [3:0] hi_in, hj_in, hi_q, hj_q;
  logic [4:0] wi_in, wj_in, wi_q, wj_q;
  ctrl_t      ht, wt;
  logic       hsame, wsame;

  mecp #(.KIND(TR_HAAR), .N(3)) u_haar (
    .clk, .rst, .i_in(hi_in), .j_in(hj_in), .i_q(hi_q), .j_q(hj_q), .t_ij(ht), .same_frame(hsame)
  );
  mecp #(.KIND(TR_WALSH), .N(4)) u_walsh (
    .clk, .rst, .i_in(wi_in), .j_in(wj_in), .i_q(wi_q), .j_q(wj_q), .t_ij(wt), .same_frame(wsame)
  );

  int checks = 0, failures = 0;

  function automatic int val(logic [1:0] v);
    if (v[0] == 1'b0) return 0;
    return v[1] ? -1 : 1;
  endfunction

  // order-8 matrices as printed, rows top to bottom
  localparam int H3 [8][8] = '{
    '{1,  1,  1,  1,  1,  1,  1,  1},
    '{1, -1,  1, -1,  1, -1,  1, -1},
    '{1,  0, -1,  0,  1,  0, -1,  0},
    '{0,  1,  0, -1,  0,  1,  0, -1},
    '{1,  0,  0,  0, -1,  0,  0,  0},
    '{0,  1,  0,  0,  0, -1,  0,  0},
    '{0,  0,  1,  0,  0,  0, -1,  0},
    '{0,  0,  0,  1,  0,  0,  0, -1}};
  localparam int W3 [8][8] = '{
    '{1,  1,  1,  1,  1,  1,  1,  1},
    '{1, -1,  1, -1,  1, -1,  1, -1},
    '{1,  1, -1, -1,  1,  1, -1, -1},
    '{1, -1, -1,  1,  1, -1, -1,  1},
    '{1,  1,  1,  1, -1, -1, -1, -1},
    '{1, -1,  1, -1, -1,  1, -1,  1},
    '{1,  1, -1, -1, -1, -1,  1,  1},
    '{1, -1, -1,  1, -1,  1,  1, -1}};

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        checks += 2;
        if (coef(1'b0, 3, i, j) != H3[i][j]) begin
          failures++;
          $display("FAIL reference Haar (%0d,%0d)", i, j);
        end
        if (coef(1'b1, 3, i, j) != W3[i][j]) begin
          failures++;
          $display("FAIL reference Walsh (%0d,%0d)", i, j);
        end
      end

    hi_in = '0; hj_in = '0; wi_in = '0; wj_in = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        automatic logic hfi = 1'($urandom), hfj = 1'($urandom);
        automatic logic wfi = 1'($urandom), wfj = 1'($urandom);
        hi_in = {hfi, 3'(i)};
        hj_in = {hfj, 3'(j)};
        wi_in = {wfi, 4'(i)};
        wj_in = {wfj, 4'(j)};
        @(negedge clk);
        hi_in = '0; hj_in = '0; wi_in = '0; wj_in = '0;  // must not reach the outputs yet
        checks += 6;
        if (i < 8 && j < 8 && val(ht) != coef(1'b0, 3, i, j)) begin
          failures++;
          $display("FAIL haar t(%0d,%0d) = %0d", i, j, val(ht));
        end
        if (val(wt) != coef(1'b1, 4, i, j)) begin
          failures++;
          $display("FAIL walsh t(%0d,%0d) = %0d", i, j, val(wt));
        end
        if (hi_q != {hfi, 3'(i)} || hj_q != {hfj, 3'(j)}) begin
          failures++;
          $display("FAIL haar index registers %0h %0h", hi_q, hj_q);
        end
        if (wi_q != {wfi, 4'(i)} || wj_q != {wfj, 4'(j)}) begin
          failures++;
          $display("FAIL walsh index registers %0h %0h", wi_q, wj_q);
        end
        if (hsame != (hfi == hfj)) begin
          failures++;
          $display("FAIL haar same_frame");
        end
        if (wsame != (wfi == wfj)) begin
          failures++;
          $display("FAIL walsh same_frame");
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
