// dsap_stream_checker: drives transforms into a dsap_ternary and checks them.
//
// Sends FRAMES input vectors of n = 2^N elements, one element every second
// clock. Vectors follow each other with no gap, except one even gap and
// one odd gap placed between later frames. Element values are random,
// except frame 0 which is all at the most negative value and frame 1
// all at the most positive, to reach the accumulator's range. Every
// result y_i is compared with sum_j coef(i, j) x_j from dsap_ref_pkg, and
// its row index, frame bit and arrival clock (2i + TOTAL + d0 clocks after
// the frame's x_0) are checked. It also sums the active cells over one
// steady-state frame period to check the n^2 steps per 2n clocks.
module dsap_stream_checker
  import dsap_ref_pkg::*;
#(
  parameter bit          WALSH  = 1'b0,
  parameter int unsigned N      = 3,
  parameter int unsigned DW     = 8,
  parameter int unsigned TOTAL  = 15,
  parameter int unsigned FRAMES = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  output logic signed [DW-1:0]   x_in,
  output logic                   x_valid,
  input  logic signed [DW+N-1:0] y_out,
  input  logic                   y_valid,
  input  logic [N-1:0]           y_row,
  input  logic                   y_frame,
  input  logic [TOTAL-1:0]       active_cells,
  output logic                   done,
  output int                     checks,
  output int                     failures,
  output int                     n_back_to_back,
  output int                     n_gapped,
  output int                     n_add,
  output int                     n_sub,
  output int                     n_nop,
  output int                     n_full_util
);
  localparam int NN = 2**N;
  localparam int D0 = (TOTAL % 2 == 0) ? 1 : 0;

  int   xs   [FRAMES][NN];
  longint t0 [FRAMES] = '{default: 0};
  longint cycle;
  int   out_frame, out_row;

  always_ff @(posedge clk) begin
    if (rst) cycle <= 0;
    else     cycle <= cycle + 1;
  end

  // stimulus
  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int j = 0; j < NN; j++) begin
        if (f == 0)      xs[f][j] = -(2**(DW-1));
        else if (f == 1) xs[f][j] = 2**(DW-1) - 1;
        else             xs[f][j] = int'($urandom_range(2**DW - 1)) - 2**(DW-1);
      end
    n_back_to_back = 0;
    n_gapped = 0;
    n_add = 0; n_sub = 0; n_nop = 0;
    x_in = '0;
    x_valid = 1'b0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      if (f == FRAMES - 3) begin
        repeat (2) @(negedge clk);  // even gap
        n_gapped++;
      end else if (f == FRAMES - 1) begin
        repeat (3) @(negedge clk);  // odd gap
        n_gapped++;
      end else if (f > 0) begin
        n_back_to_back++;
      end
      for (int j = 0; j < NN; j++) begin
        x_in    = DW'(xs[f][j]);
        x_valid = 1'b1;
        if (j == 0) t0[f] = cycle;
        @(negedge clk);
        x_valid = 1'b0;
        x_in    = '0;
        @(negedge clk);
      end
    end
  end

  // result checking
  initial begin
    checks = 0; failures = 0; out_frame = 0; out_row = 0; done = 1'b0;
    n_full_util = 0;
  end

  always @(negedge clk) begin
    if (!rst && y_valid && out_frame < FRAMES) begin
      automatic longint expv = 0;
      for (int j = 0; j < NN; j++) begin
        automatic int c = coef(WALSH, N, out_row, j);
        expv += c * xs[out_frame][j];
        if (c > 0) n_add++; else if (c < 0) n_sub++; else n_nop++;
      end
      checks += 4;
      if (longint'(y_out) != expv) begin
        failures++;
        $display("FAIL frame %0d row %0d: y=%0d expected %0d", out_frame, out_row, y_out, expv);
      end
      if (int'(y_row) != out_row) begin
        failures++;
        $display("FAIL frame %0d: row index %0d expected %0d", out_frame, y_row, out_row);
      end
      if (y_frame != out_frame[0]) begin
        failures++;
        $display("FAIL frame %0d row %0d: frame bit %0d", out_frame, out_row, y_frame);
      end
      if (cycle != t0[out_frame] + 2*out_row + TOTAL + D0) begin
        failures++;
        $display("FAIL frame %0d row %0d: at clock %0d expected %0d", out_frame, out_row,
                 cycle, t0[out_frame] + 2*out_row + TOTAL + D0);
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

  // Utilisation: frames 1 .. 4 run back to back, so the array is in steady
  // state during the 2n clocks starting when x_0 of frame 3 enters. Each
  // transform needs n^2 steps and one transform enters per 2n clocks, so
  // exactly n^2 steps fall in that window (n/2 cells busy on average).
  initial begin
    automatic int steps = 0;
    @(negedge clk);
    while (rst || t0[3] == 0 || cycle < t0[3]) @(negedge clk);
    for (int k = 0; k < 2*NN; k++) begin
      steps += $countones(active_cells);
      @(negedge clk);
    end
    checks++;
    if (steps != NN*NN) begin
      failures++;
      $display("FAIL utilisation: %0d steps in 2n clocks, expected %0d", steps, NN*NN);
    end else begin
      n_full_util++;
    end
  end
endmodule
