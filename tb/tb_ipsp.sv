// tb_ipsp: inner product step processor test with random operands.
//
// Each clock it presents random x, y, valid bits, enable and control word,
// and one clock later checks that y_out = y + t*x when both slots are
// valid and enabled (ADD +1, SUB -1, NOP 0) and y_out = y otherwise, that
// x and the valid bits are passed on after one register, and that active
// flags exactly the steps taken. Extreme values check the N extra
// accumulator bits.
module tb_ipsp;
  import dsap_pkg::*;

  localparam int DW = 8, N = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic signed [DW-1:0]   x_in, x_out;
  logic signed [DW+N-1:0] y_in, y_out;
  logic                   xv_in, yv_in, xv_out, yv_out, en, active;
  ctrl_t                  t_ij;

  ipsp #(.DW(DW), .N(N)) u_dut (
    .clk, .rst, .x_in, .x_valid_in(xv_in), .y_in, .y_valid_in(yv_in), .t_ij, .en,
    .x_out, .x_valid_out(xv_out), .y_out, .y_valid_out(yv_out), .active
  );

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_nop = 0, n_idle = 0;

  initial begin
    x_in = '0; y_in = '0; xv_in = 0; yv_in = 0; t_ij = '0; en = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      automatic int xv, yv, tv, expy;
      automatic bit step;
      // registered inputs
      xv = (k % 50 == 0) ? -(2**(DW-1)) : int'($urandom_range(2**DW - 1)) - 2**(DW-1);
      yv = (k % 50 == 1) ? -(2**(DW+N-1)) + 2**(DW-1)
                         : int'($urandom_range(2**(DW+N-1))) - 2**(DW+N-2);
      x_in  = DW'(xv);
      y_in  = (DW+N)'(yv);
      xv_in = 1'($urandom);
      yv_in = (k % 3 != 0);
      @(negedge clk);
      // combinational control from the coprocessor
      t_ij = 2'($urandom);
      en   = ($urandom_range(7) != 0);
      #1;
      tv   = !t_ij.v0 ? 0 : (t_ij.v1 ? -1 : 1);
      step = xv_in && yv_in && en;
      expy = yv + (step ? tv * xv : 0);
      checks += 4;
      if (int'(y_out) != expy) begin
        failures++;
        $display("FAIL y=%0d x=%0d t=%0d step=%0d: got %0d expected %0d", yv, xv, tv, step,
                 y_out, expy);
      end
      if (int'(x_out) != xv || xv_out != xv_in || yv_out != yv_in) begin
        failures++;
        $display("FAIL pass-through");
      end
      if (active != step) begin
        failures++;
        $display("FAIL active flag");
      end
      if (!step) n_idle++; else if (tv > 0) n_add++; else if (tv < 0) n_sub++; else n_nop++;
      if (k == 1999) begin
        checks++;
        if (n_add == 0 || n_sub == 0 || n_nop == 0 || n_idle == 0) failures++;
      end
    end
    $display("add %0d sub %0d nop %0d idle %0d", n_add, n_sub, n_nop, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
