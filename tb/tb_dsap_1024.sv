// tb_dsap_1024: a 1024-point Haar transform on a cascade of four modules
// of 512 cells each, the cascading example of a large transform split
// over chips that each hold a quarter of the array. Five transforms run back
// to back (plus the checker's gapped ones) and every result is checked
// against the matrix recursion; the index LSB crossing the first module
// boundary must toggle once per element.
module tb_dsap_1024;
  import dsap_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic done;
  int checks, failures, b2b, gap, nadd, nsub, nnop, util, lsb;

  dsap_ternary_case #(.KIND(TR_HAAR), .N(10), .MODULES(4), .FRAMES(8)) u_case (
    .clk, .rst, .done, .checks, .failures, .n_back_to_back(b2b), .n_gapped(gap),
    .n_add(nadd), .n_sub(nsub), .n_nop(nnop), .n_full_util(util), .n_lsb_steps(lsb)
  );

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
  end

  initial begin
    automatic int mf;
    wait (done);
    repeat (2) @(posedge clk);
    mf = (b2b == 0) + (gap == 0) + (util == 0) + (lsb < 1024);
    $display("checks %0d failures %0d back-to-back %0d gap %0d util %0d lsb steps %0d",
             checks, failures, b2b, gap, util, lsb);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 4, failures + mf);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
