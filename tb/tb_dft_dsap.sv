// tb_dft_dsap: end-to-end test of the DFT dual systolic array.
//
// Instance A (n = 4, the default) first runs one transform alone and,
// clock by clock from step 3 to step 10 after x_0, compares the control
// vector a, the root vector b and the coefficient f held in each of its
// seven cells with the coefficient-flow table of the n = 4 example
// (w^k written as exponent k mod 4, '-' for 0). Then it streams more
// transforms, back to back and after a gap, and checks every result
// exactly. Instance B (n = 8) checks results within rounding of the
// twiddle table.
module tb_dft_dsap;
  import dsap_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam int DW = 8;

  // ---- instance A: n = 4 ----------------------------------------------
  logic signed [DW-1:0] axr, axi;
  logic                 axv, ayv, ayf, adone;
  logic signed [DW+2:0] ayr, ayi;
  logic [1:0]           arow;
  logic [6:0]           aact;
  int                   achecks, afail, ab2b;
  longint               at0;

  dft_dsap #(.N(2), .DW(DW)) u_a (
    .clk, .rst, .x_re(axr), .x_im(axi), .x_valid(axv), .y_re(ayr), .y_im(ayi),
    .y_valid(ayv), .y_row(arow), .y_frame(ayf), .active(aact)
  );
  dft_stream_checker #(.N(2), .DW(DW), .FRAMES(6), .TOL(0.0)) u_achk (
    .clk, .rst, .x_re(axr), .x_im(axi), .x_valid(axv), .y_re(ayr), .y_im(ayi),
    .y_valid(ayv), .y_row(arow), .y_frame(ayf), .done(adone), .checks(achecks),
    .failures(afail), .n_back_to_back(ab2b), .t_first(at0)
  );

  // ---- instance B: n = 8 ----------------------------------------------
  logic signed [DW-1:0] bxr, bxi;
  logic                 bxv, byv, byf, bdone;
  logic signed [DW+3:0] byr, byi;
  logic [2:0]           brow;
  logic [14:0]          bact;
  int                   bchecks, bfail, bb2b;
  longint               bt0;

  dft_dsap #(.N(3), .DW(DW)) u_b (
    .clk, .rst, .x_re(bxr), .x_im(bxi), .x_valid(bxv), .y_re(byr), .y_im(byi),
    .y_valid(byv), .y_row(brow), .y_frame(byf), .active(bact)
  );
  dft_stream_checker #(.N(3), .DW(DW), .FRAMES(6), .TOL(3.0)) u_bchk (
    .clk, .rst, .x_re(bxr), .x_im(bxi), .x_valid(bxv), .y_re(byr), .y_im(byi),
    .y_valid(byv), .y_row(brow), .y_frame(byf), .done(bdone), .checks(bchecks),
    .failures(bfail), .n_back_to_back(bb2b), .t_first(bt0)
  );

  // ---- coefficient flow of instance A ---------------------------------
  logic [1:0] a_code [7];
  logic       b_nz   [7];
  logic [1:0] b_exp  [7];
  logic       f_nz   [7];
  logic [1:0] f_exp  [7];
  for (genvar p = 0; p < 7; p++) begin : g_probe
    always_comb begin
      a_code[p] = u_a.g_cell[p].u_mecp.a_q;
      b_nz[p]   = u_a.g_cell[p].u_mecp.b_nz_q;
      b_exp[p]  = u_a.g_cell[p].u_mecp.b_exp_q;
      f_nz[p]   = u_a.g_cell[p].f_nz;
      f_exp[p]  = u_a.g_cell[p].f_exp;
    end
  end

  // Rows of the table for steps 3 .. 10; for b and f: -1 means 0,
  // otherwise the exponent of w (mod 4).
  localparam int A_TAB [8][7] = '{
    '{2, 1, 1, 0, 0, 0, 0}, '{2, 2, 1, 1, 0, 0, 0}, '{2, 2, 2, 1, 1, 0, 0},
    '{2, 2, 2, 2, 1, 1, 0}, '{2, 2, 2, 2, 2, 1, 1}, '{2, 2, 2, 2, 2, 2, 1},
    '{0, 2, 2, 2, 2, 2, 2}, '{0, 0, 2, 2, 2, 2, 2}};
  localparam int B_TAB [8][7] = '{
    '{-1, -1, -1, -1, 0, 0, 1}, '{-1, -1, -1, 0, 0, 1, 1}, '{-1, -1, 0, 0, 1, 1, 2},
    '{-1, 0, 0, 1, 1, 2, 2},    '{0, 0, 1, 1, 2, 2, 3},    '{0, 1, 1, 2, 2, 3, 3},
    '{1, 1, 2, 2, 3, 3, -1},    '{1, 2, 2, 3, 3, -1, -1}};
  localparam int F_TAB [8][7] = '{
    '{-1, -1, -1, -1, -1, -1, -1}, '{-1, -1, -1, 0, -1, -1, -1},
    '{-1, -1, 0, 0, 0, -1, -1},    '{-1, 0, 0, 1, 0, 0, -1},
    '{0, 0, 2, 1, 2, 0, 0},        '{0, 3, 2, 0, 2, 3, 0},
    '{-1, 3, 2, 0, 2, 3, -1},      '{-1, -1, 2, 1, 2, -1, -1}};

  int fchecks = 0, ffail = 0;

  function automatic bit match(int tab, logic nz, logic [1:0] e);
    if (tab < 0) return !nz;
    return nz && (int'(e) == tab);
  endfunction

  initial begin
    wait (!rst && at0 != 0);
    for (int s = 3; s <= 10; s++) begin
      while (u_achk.cycle < at0 + s) @(negedge clk);
      for (int p = 0; p < 7; p++) begin
        fchecks += 3;
        if (int'(a_code[p]) != A_TAB[s-3][p]) begin
          ffail++;
          $display("FAIL flow step %0d cell %0d: a = %0d", s, p, a_code[p]);
        end
        if (!match(B_TAB[s-3][p], b_nz[p], b_exp[p])) begin
          ffail++;
          $display("FAIL flow step %0d cell %0d: b = %0d/%0d", s, p, b_nz[p], b_exp[p]);
        end
        if (!match(F_TAB[s-3][p], f_nz[p], f_exp[p])) begin
          ffail++;
          $display("FAIL flow step %0d cell %0d: f = %0d/%0d", s, p, f_nz[p], f_exp[p]);
        end
      end
      @(negedge clk);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
  end

  initial begin
    automatic int mf = 0;
    wait (adone && bdone);
    repeat (2) @(posedge clk);
    mf = (ab2b == 0) + (bb2b == 0) + (fchecks != 168);
    $display("n=4: checks %0d failures %0d; n=8: checks %0d failures %0d; flow checks %0d failures %0d",
             achecks, afail, bchecks, bfail, fchecks, ffail);
    $display("back-to-back transforms: %0d and %0d", ab2b, bb2b);
    $display("TB_RESULT checks=%0d failures=%0d", achecks + bchecks + fchecks + 3,
             afail + bfail + ffail + mf);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", achecks + bchecks + fchecks, 1);
    $finish;
  end
endmodule
