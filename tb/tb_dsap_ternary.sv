// tb_dsap_ternary: end-to-end test of the dual systolic array processor.
//
// Runs five configurations side by side, each streaming eight transforms
// (back to back, then after an even and an odd gap) and checking every
// result, its row index, frame bit and arrival clock:
//   Haar  n = 8,  one module of 15 cells (the default)
//   Walsh n = 8,  one module
//   Haar  n = 8,  cascade of 3 modules x 5 cells
//   Walsh n = 16, cascade of 2 modules x 16 cells (even cell count)
//   Haar  n = 16, cascade of 4 modules x 8 cells (even cell count)
// Each mechanism must occur at least once: Haar and Walsh coefficient
// generation, ADD / SUB / NOP steps, back-to-back transforms, gaps between
// transforms, steady-state utilisation of n/2 cells, index rebuilding from
// a neighbour's LSB in a cascade, and the even-cell-count slot delay.
module tb_dsap_ternary;
  import dsap_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam int C = 5;
  logic done [C];
  int checks [C], failures [C], b2b [C], gap [C], nadd [C], nsub [C], nnop [C],
      util [C], lsb [C];

  dsap_ternary_case #(.KIND(TR_HAAR),  .N(3), .MODULES(1)) c0 (.clk, .rst, .done(done[0]),
    .checks(checks[0]), .failures(failures[0]), .n_back_to_back(b2b[0]), .n_gapped(gap[0]),
    .n_add(nadd[0]), .n_sub(nsub[0]), .n_nop(nnop[0]), .n_full_util(util[0]), .n_lsb_steps(lsb[0]));
  dsap_ternary_case #(.KIND(TR_WALSH), .N(3), .MODULES(1)) c1 (.clk, .rst, .done(done[1]),
    .checks(checks[1]), .failures(failures[1]), .n_back_to_back(b2b[1]), .n_gapped(gap[1]),
    .n_add(nadd[1]), .n_sub(nsub[1]), .n_nop(nnop[1]), .n_full_util(util[1]), .n_lsb_steps(lsb[1]));
  dsap_ternary_case #(.KIND(TR_HAAR),  .N(3), .MODULES(3)) c2 (.clk, .rst, .done(done[2]),
    .checks(checks[2]), .failures(failures[2]), .n_back_to_back(b2b[2]), .n_gapped(gap[2]),
    .n_add(nadd[2]), .n_sub(nsub[2]), .n_nop(nnop[2]), .n_full_util(util[2]), .n_lsb_steps(lsb[2]));
  dsap_ternary_case #(.KIND(TR_WALSH), .N(4), .MODULES(2)) c3 (.clk, .rst, .done(done[3]),
    .checks(checks[3]), .failures(failures[3]), .n_back_to_back(b2b[3]), .n_gapped(gap[3]),
    .n_add(nadd[3]), .n_sub(nsub[3]), .n_nop(nnop[3]), .n_full_util(util[3]), .n_lsb_steps(lsb[3]));
  dsap_ternary_case #(.KIND(TR_HAAR),  .N(4), .MODULES(4)) c4 (.clk, .rst, .done(done[4]),
    .checks(checks[4]), .failures(failures[4]), .n_back_to_back(b2b[4]), .n_gapped(gap[4]),
    .n_add(nadd[4]), .n_sub(nsub[4]), .n_nop(nnop[4]), .n_full_util(util[4]), .n_lsb_steps(lsb[4]));

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
  end

  initial begin
    automatic int total_checks = 0, total_fail = 0;
    automatic int m_haar = 0, m_walsh = 0, m_add = 0, m_sub = 0, m_nop = 0, m_b2b = 0,
                  m_gap = 0, m_util = 0, m_lsb = 0, m_even = 0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    repeat (2) @(posedge clk);
    for (int k = 0; k < C; k++) begin
      total_checks += checks[k];
      total_fail   += failures[k];
      m_add  += nadd[k];
      m_sub  += nsub[k];
      m_nop  += nnop[k];
      m_b2b  += b2b[k];
      m_gap  += gap[k];
      m_util += util[k];
      m_lsb  += lsb[k];
      $display("config %0d: checks %0d failures %0d lsb-rebuilt steps %0d",
               k, checks[k], failures[k], lsb[k]);
    end
    // the Haar and Walsh runs and the even-cell runs count when clean
    if (failures[0] == 0 && failures[2] == 0 && failures[4] == 0) m_haar++;
    if (failures[1] == 0 && failures[3] == 0) m_walsh++;
    if (failures[3] == 0 && failures[4] == 0) m_even++;
    $display("mechanisms: haar %0d walsh %0d add %0d sub %0d nop %0d back-to-back %0d gap %0d",
             m_haar, m_walsh, m_add, m_sub, m_nop, m_b2b, m_gap);
    $display("            utilisation %0d lsb-cascade %0d even-cells %0d", m_util, m_lsb, m_even);
    total_checks += 10;
    total_fail += (m_haar == 0) + (m_walsh == 0) + (m_add == 0) + (m_sub == 0) + (m_nop == 0)
                + (m_b2b == 0) + (m_gap == 0) + (m_util == 0) + (m_lsb == 0) + (m_even == 0);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fail);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d",
             checks[0] + checks[1] + checks[2] + checks[3] + checks[4], 1);
    $finish;
  end
endmodule
