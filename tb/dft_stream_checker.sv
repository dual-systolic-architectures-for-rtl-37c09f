// dft_stream_checker: drives transforms into a dft_dsap and checks them.
//
// Frame 0 is sent alone (so the coefficient flow of one transform can be
// observed), then FRAMES-1 more follow back to back, with one odd gap
// before the last. Inputs are random complex values; frame 1 is at the
// extremes of the range. Each y_i is compared with the DFT
// sum_j x_j exp(-2 pi i j k / n) computed in floating point, within TOL
// data units per part (TOL = 0 for n = 4, where every root is exact); its
// row index, frame bit and arrival clock (2i + 2n - 1 after x_0) are
// checked too.
module dft_stream_checker #(
  parameter int unsigned N      = 2,
  parameter int unsigned DW     = 8,
  parameter int unsigned FRAMES = 6,
  parameter real         TOL    = 0.0,
  parameter int unsigned LONE   = 40     // idle clocks after frame 0
) (
  input  logic                  clk,
  input  logic                  rst,
  output logic signed [DW-1:0]  x_re,
  output logic signed [DW-1:0]  x_im,
  output logic                  x_valid,
  input  logic signed [DW+N:0]  y_re,
  input  logic signed [DW+N:0]  y_im,
  input  logic                  y_valid,
  input  logic [N-1:0]          y_row,
  input  logic                  y_frame,
  output logic                  done,
  output int                    checks,
  output int                    failures,
  output int                    n_back_to_back,
  output longint                t_first           // clock of x_0 of frame 0
);
  localparam int NN = 2**N;
  localparam real PI = 3.14159265358979323846;

  int     xr [FRAMES][NN];
  int     xi [FRAMES][NN];
  longint t0 [FRAMES] = '{default: 0};
  longint cycle = 0;
  int     out_frame = 0, out_row = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic real absdiff(real a, real b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int j = 0; j < NN; j++) begin
        if (f == 1) begin
          xr[f][j] = (j % 2 == 0) ? 2**(DW-1) - 1 : -(2**(DW-1));
          xi[f][j] = (j % 3 == 0) ? -(2**(DW-1)) : 2**(DW-1) - 1;
        end else begin
          xr[f][j] = int'($urandom_range(2**DW - 1)) - 2**(DW-1);
          xi[f][j] = int'($urandom_range(2**DW - 1)) - 2**(DW-1);
        end
      end
    n_back_to_back = 0;
    t_first = 0;
    x_re = '0; x_im = '0; x_valid = 1'b0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      if (f == 1) repeat (LONE) @(negedge clk);
      else if (f == FRAMES - 1) repeat (3) @(negedge clk);
      else if (f > 1) n_back_to_back++;
      for (int j = 0; j < NN; j++) begin
        x_re = DW'(xr[f][j]);
        x_im = DW'(xi[f][j]);
        x_valid = 1'b1;
        if (j == 0) t0[f] = cycle;
        if (f == 0 && j == 0) t_first = cycle;
        @(negedge clk);
        x_valid = 1'b0;
        x_re = '0; x_im = '0;
        @(negedge clk);
      end
    end
  end

  initial begin
    checks = 0; failures = 0; done = 1'b0;
  end

  always @(negedge clk) begin
    if (!rst && y_valid && out_frame < FRAMES) begin
      automatic real er = 0.0, ei = 0.0;
      for (int j = 0; j < NN; j++) begin
        automatic real a = -2.0 * PI * out_row * j / NN;
        er += xr[out_frame][j] * $cos(a) - xi[out_frame][j] * $sin(a);
        ei += xr[out_frame][j] * $sin(a) + xi[out_frame][j] * $cos(a);
      end
      checks += 4;
      if (absdiff(real'(y_re), er) > TOL + 1e-6 || absdiff(real'(y_im), ei) > TOL + 1e-6) begin
        failures++;
        $display("FAIL frame %0d row %0d: (%0d, %0d) expected (%f, %f)", out_frame, out_row,
                 y_re, y_im, er, ei);
      end
      if (int'(y_row) != out_row) begin
        failures++;
        $display("FAIL frame %0d: row %0d expected %0d", out_frame, y_row, out_row);
      end
      if (y_frame != out_frame[0]) begin
        failures++;
        $display("FAIL frame %0d row %0d: frame bit", out_frame, out_row);
      end
      if (cycle != t0[out_frame] + 2*out_row + 2*NN - 1) begin
        failures++;
        $display("FAIL frame %0d row %0d: at clock %0d", out_frame, out_row, cycle);
      end
      if (out_row == NN - 1) begin
        out_row = 0;
        out_frame++;
        if (out_frame == FRAMES) done <= 1'b1;
      end else begin
        out_row++;
      end
    end
  end
endmodule
