// tb_dsap_top: the complete design at its default sizes, end to end.
//
// The Haar processor (n = 8, 15 cells) streams eight transforms, the
// Walsh processor (n = 16, 31 cells) eight and the DFT processor (n = 4,
// 7 cells) six, all at the same time. Every result is checked against a
// reference (matrix recursion, floating-point DFT) together with its row
// index, frame bit and arrival clock. Mechanisms that must each occur:
// ADD, SUB and NOP steps (Haar), ADD and SUB steps (Walsh), back-to-back
// transforms, gaps between transforms, steady-state utilisation of n/2
// cells, and back-to-back DFT transforms. The input of the Haar array must
// also leave its right end unchanged.
module tb_dsap_top;
  import dsap_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic signed [7:0]  h_x_in, h_x_out;
  logic               h_x_valid, h_y_valid, h_y_frame, h_x_out_valid, h_row_lsb_out, h_col_lsb_out;
  logic signed [10:0] h_y_out;
  logic [2:0]         h_y_row;
  logic [14:0]        h_active_cells;
  logic signed [7:0]  w_x_in, w_x_out;
  logic               w_x_valid, w_y_valid, w_y_frame, w_x_out_valid, w_row_lsb_out, w_col_lsb_out;
  logic signed [11:0] w_y_out;
  logic [3:0]         w_y_row;
  logic [30:0]        w_active_cells;
  logic signed [7:0]  f_x_re, f_x_im;
  logic               f_x_valid, f_y_valid, f_y_frame;
  logic signed [10:0] f_y_re, f_y_im;
  logic [1:0]         f_y_row;
  logic [6:0]         f_active_cells;

  dsap_top u_dut (.*);

  logic tdone, wdone, fdone;
  int tchecks, tfail, tb2b, tgap, tadd, tsub, tnop, tutil;
  int wchecks, wfail, wb2b, wgap, wadd, wsub, wnop, wutil;
  int fchecks, ffail, fb2b;
  longint ft0;

  dsap_stream_checker #(.WALSH(1'b0), .N(3), .DW(8), .TOTAL(15), .FRAMES(8)) u_tchk (
    .clk, .rst, .x_in(h_x_in), .x_valid(h_x_valid), .y_out(h_y_out), .y_valid(h_y_valid),
    .y_row(h_y_row), .y_frame(h_y_frame), .active_cells(h_active_cells),
    .done(tdone), .checks(tchecks), .failures(tfail), .n_back_to_back(tb2b), .n_gapped(tgap),
    .n_add(tadd), .n_sub(tsub), .n_nop(tnop), .n_full_util(tutil)
  );

  dsap_stream_checker #(.WALSH(1'b1), .N(4), .DW(8), .TOTAL(31), .FRAMES(8)) u_wchk (
    .clk, .rst, .x_in(w_x_in), .x_valid(w_x_valid), .y_out(w_y_out), .y_valid(w_y_valid),
    .y_row(w_y_row), .y_frame(w_y_frame), .active_cells(w_active_cells),
    .done(wdone), .checks(wchecks), .failures(wfail), .n_back_to_back(wb2b), .n_gapped(wgap),
    .n_add(wadd), .n_sub(wsub), .n_nop(wnop), .n_full_util(wutil)
  );

  dft_stream_checker #(.N(2), .DW(8), .FRAMES(6), .TOL(0.0)) u_fchk (
    .clk, .rst, .x_re(f_x_re), .x_im(f_x_im), .x_valid(f_x_valid), .y_re(f_y_re),
    .y_im(f_y_im), .y_valid(f_y_valid), .y_row(f_y_row), .y_frame(f_y_frame),
    .done(fdone), .checks(fchecks), .failures(ffail), .n_back_to_back(fb2b), .t_first(ft0)
  );

  // Haar x must also leave the right end unchanged after 15 clocks
  int xq [$];
  int xchecks = 0, xfail = 0;
  always @(negedge clk) begin
    if (!rst && h_x_valid) xq.push_back(int'(h_x_in));
    if (!rst && h_x_out_valid) begin
      xchecks++;
      if (xq.size() == 0 || int'(h_x_out) != xq.pop_front()) begin
        xfail++;
        $display("FAIL x leaving the right end");
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
  end

  initial begin
    automatic int mf;
    wait (tdone && wdone && fdone);
    repeat (20) @(posedge clk);
    $display("haar: checks %0d failures %0d, add %0d sub %0d nop %0d, back-to-back %0d gap %0d util %0d",
             tchecks, tfail, tadd, tsub, tnop, tb2b, tgap, tutil);
    $display("walsh: checks %0d failures %0d, add %0d sub %0d nop %0d, back-to-back %0d gap %0d util %0d",
             wchecks, wfail, wadd, wsub, wnop, wb2b, wgap, wutil);
    $display("dft:  checks %0d failures %0d, back-to-back %0d", fchecks, ffail, fb2b);
    mf = (tadd == 0) + (tsub == 0) + (tnop == 0) + (tb2b == 0) + (tgap == 0) + (tutil == 0)
       + (wadd == 0) + (wsub == 0) + (wnop != 0) + (wb2b == 0) + (wgap == 0) + (wutil == 0)
       + (fb2b == 0) + (xchecks == 0);
    $display("TB_RESULT checks=%0d failures=%0d", tchecks + wchecks + fchecks + xchecks + 14,
             tfail + wfail + ffail + xfail + mf);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", tchecks + wchecks + fchecks, 1);
    $finish;
  end
endmodule
