// dft_ipsp: complex inner product step processor of the DFT array.
//
// One step of y_i <- y_i + f_ij * x_j with complex x and y and
// f_ij = omega^e, omega = exp(-2*pi*j/n), or f_ij = 0. The data register
// holds x_j (moving right), the accumulation register y_i (moving left).
// omega^e = cos(t) - j sin(t), t = 2*pi*e/n, is read from a table of n
// cosines and sines computed at elaboration, scaled by 2^(TW-2) so that
// +/-1 is exact; products are rounded back to the data scale. For n = 4
// every root is 1, -j, -1 or j and the results are exact.
// The accumulator is N+1 bits wider than the data: n terms, and up to
// sqrt(2) growth of a rotated complex value.
//
// Timing: registers load every clock; y_out is combinational from the
// registers and the coefficient, and is loaded by the left neighbour. The
// step is taken when both slots are valid and en (same transform) is high.
module dft_ipsp #(
  parameter int unsigned N  = 2,    // log2 of the transform length
  parameter int unsigned DW = 8,    // width of each part of x
  parameter int unsigned TW = 12    // twiddle width, 1.0 = 2^(TW-2)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DW-1:0]     x_re_in,
  input  logic signed [DW-1:0]     x_im_in,
  input  logic                     x_valid_in,
  input  logic signed [DW+N:0]     y_re_in,
  input  logic signed [DW+N:0]     y_im_in,
  input  logic                     y_valid_in,
  input  logic                     f_nz,
  input  logic [N-1:0]             f_exp,
  input  logic                     en,
  output logic signed [DW-1:0]     x_re_out,
  output logic signed [DW-1:0]     x_im_out,
  output logic                     x_valid_out,
  output logic signed [DW+N:0]     y_re_out,
  output logic signed [DW+N:0]     y_im_out,
  output logic                     y_valid_out,
  output logic                     active        // a step this clock
);
  localparam int unsigned AW = DW + N + 1;
  localparam int unsigned PW = DW + TW + 1;

  typedef logic signed [TW-1:0] table_t [2**N];

  function automatic table_t make_table(bit sine);
    table_t t;
    real    ang, v;
    for (int k = 0; k < 2**N; k++) begin
      ang  = 2.0 * 3.14159265358979323846 * k / (2.0 ** N);
      v    = (sine ? $sin(ang) : $cos(ang)) * (2.0 ** (TW - 2));
      t[k] = TW'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam table_t COS_T = make_table(1'b0);
  localparam table_t SIN_T = make_table(1'b1);

  logic signed [DW-1:0] xr, xi;
  logic                 xv;
  logic signed [AW-1:0] yr, yi;
  logic                 yv;

  always_ff @(posedge clk) begin
    if (rst) begin
      xr <= '0; xi <= '0; xv <= 1'b0;
      yr <= '0; yi <= '0; yv <= 1'b0;
    end else begin
      xr <= x_re_in; xi <= x_im_in; xv <= x_valid_in;
      yr <= y_re_in; yi <= y_im_in; yv <= y_valid_in;
    end
  end

  logic signed [PW-1:0] c, s, xre, xie;
  logic signed [PW-1:0] pr, pi;
  logic signed [AW-1:0] dr, di;

  always_comb begin
    c   = PW'(COS_T[f_exp]);
    s   = PW'(SIN_T[f_exp]);
    xre = PW'(xr);
    xie = PW'(xi);
    // (c - j s)(xr + j xi) = (c xr + s xi) + j (c xi - s xr), then round
    pr  = c * xre + s * xie + PW'(2 ** (TW - 3));
    pi  = c * xie - s * xre + PW'(2 ** (TW - 3));
    dr = AW'(pr >>> (TW - 2));
    di = AW'(pi >>> (TW - 2));
    active = xv & yv & en;
    if (active && f_nz) begin
      y_re_out = yr + dr;
      y_im_out = yi + di;
    end else begin
      y_re_out = yr;
      y_im_out = yi;
    end
    x_re_out    = xr;
    x_im_out    = xi;
    x_valid_out = xv;
    y_valid_out = yv;
  end
endmodule
