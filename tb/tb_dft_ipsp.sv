// tb_dft_ipsp: complex step processor test.
//
// Random complex x and y, random coefficient omega^e or 0, random valid
// bits and enable. One clock after loading, y_out must equal
// y + omega^e * x (omega = exp(-2 pi j / n)) when the step is taken and
// y otherwise: exactly for n = 4, within half a unit per product plus
// table error for n = 8. x and the valid bits must pass unchanged.
module tb_dft_ipsp;
  localparam int DW = 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic signed [DW-1:0] xr, xi;
  logic                 xv, yv, fnz, en;
  logic [2:0]           fexp;
  logic signed [DW+2:0] y4r_in, y4i_in, y4r, y4i;
  logic signed [DW+3:0] y8r_in, y8i_in, y8r, y8i;
  logic signed [DW-1:0] x4r, x4i, x8r, x8i;
  logic                 xv4, yv4, xv8, yv8, act4, act8;

  dft_ipsp #(.N(2), .DW(DW)) u_n4 (
    .clk, .rst, .x_re_in(xr), .x_im_in(xi), .x_valid_in(xv),
    .y_re_in(y4r_in), .y_im_in(y4i_in), .y_valid_in(yv),
    .f_nz(fnz), .f_exp(fexp[1:0]), .en,
    .x_re_out(x4r), .x_im_out(x4i), .x_valid_out(xv4),
    .y_re_out(y4r), .y_im_out(y4i), .y_valid_out(yv4), .active(act4)
  );
  dft_ipsp #(.N(3), .DW(DW)) u_n8 (
    .clk, .rst, .x_re_in(xr), .x_im_in(xi), .x_valid_in(xv),
    .y_re_in(y8r_in), .y_im_in(y8i_in), .y_valid_in(yv),
    .f_nz(fnz), .f_exp(fexp), .en,
    .x_re_out(x8r), .x_im_out(x8i), .x_valid_out(xv8),
    .y_re_out(y8r), .y_im_out(y8i), .y_valid_out(yv8), .active(act8)
  );

  int checks = 0, failures = 0, steps = 0;

  function automatic real absdiff(real a, real b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    xr = '0; xi = '0; xv = 0; yv = 0; fnz = 0; fexp = '0; en = 0;
    y4r_in = '0; y4i_in = '0; y8r_in = '0; y8i_in = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      automatic int vxr = int'($urandom_range(255)) - 128, vxi = int'($urandom_range(255)) - 128;
      automatic int vyr = int'($urandom_range(1023)) - 512, vyi = int'($urandom_range(1023)) - 512;
      automatic bit step;
      automatic real a4, a8, e4r, e4i, e8r, e8i;
      xr = DW'(vxr); xi = DW'(vxi); xv = 1'($urandom_range(3) != 0); yv = 1'($urandom_range(3) != 0);
      y4r_in = (DW+3)'(vyr); y4i_in = (DW+3)'(vyi);
      y8r_in = (DW+4)'(vyr); y8i_in = (DW+4)'(vyi);
      @(negedge clk);
      fnz = 1'($urandom_range(4) != 0); fexp = 3'($urandom); en = 1'($urandom_range(5) != 0);
      #1;
      step = xv && yv && en;
      if (step && fnz) steps++;
      a4 = -2.0 * PI * (fexp % 4) / 4.0;
      a8 = -2.0 * PI * fexp / 8.0;
      e4r = vyr; e4i = vyi; e8r = vyr; e8i = vyi;
      if (step && fnz) begin
        e4r += vxr * $cos(a4) - vxi * $sin(a4);
        e4i += vxr * $sin(a4) + vxi * $cos(a4);
        e8r += vxr * $cos(a8) - vxi * $sin(a8);
        e8i += vxr * $sin(a8) + vxi * $cos(a8);
      end
      checks += 4;
      if (absdiff(real'(y4r), e4r) > 1e-6 || absdiff(real'(y4i), e4i) > 1e-6) begin
        failures++;
        $display("FAIL n=4 e=%0d x=(%0d,%0d): (%0d,%0d) expected (%f,%f)", fexp % 4, vxr, vxi,
                 y4r, y4i, e4r, e4i);
      end
      if (absdiff(real'(y8r), e8r) > 0.6 || absdiff(real'(y8i), e8i) > 0.6) begin
        failures++;
        $display("FAIL n=8 e=%0d x=(%0d,%0d): (%0d,%0d) expected (%f,%f)", fexp, vxr, vxi,
                 y8r, y8i, e8r, e8i);
      end
      if (int'(x4r) != vxr || int'(x8i) != vxi || xv4 != xv || yv8 != yv) begin
        failures++;
        $display("FAIL pass-through");
      end
      if (act4 != step || act8 != step) begin
        failures++;
        $display("FAIL active flag");
      end
    end
    checks++;
    if (steps == 0) failures++;
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
