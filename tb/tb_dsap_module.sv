// tb_dsap_module: one DSAP module of 7 cells (Haar, n = 4) tested alone.
//
// Module A runs its two index counters in clock mode. Module B gets the
// same stimulus but runs both counters in LSB mode, fed only the LSB of
// the index of each element and slot entering it, as a cascaded module
// would be. Four transforms are streamed back to back; each y_i from both
// modules is checked against the Haar matrix, together with its row
// index and its arrival clock (2i + 7 after x_0). The right-end outputs
// are checked too: x_j leaves after 7 clocks with column LSB j[0], and
// row_lsb_out is the LSB of the row index leaving the left end.
module tb_dsap_module;
  import dsap_pkg::*;
  import dsap_ref_pkg::*;

  localparam int N = 2, NN = 4, DW = 8, CELLS = 7, FRAMES = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic signed [DW-1:0]   x_in;
  logic                   x_valid;
  logic                   col_lsb, row_lsb;

  logic signed [DW+N-1:0] ya, yb;
  logic                   yva, yvb, rla, rlb, cla, clb, xva, xvb;
  logic [N:0]             ia, ib;
  logic signed [DW-1:0]   xa, xb;
  logic [CELLS-1:0]       acta, actb;

  dsap_module #(.KIND(TR_HAAR), .N(N), .DW(DW), .CELLS(CELLS)) u_a (
    .clk, .rst, .x_in, .x_valid_in(x_valid), .y_out(ya), .y_valid_out(yva), .y_index_out(ia),
    .x_out(xa), .x_valid_out(xva), .y_in('0), .y_valid_in(x_valid),
    .j_lsb_mode(1'b0), .j_inc(x_valid), .col_lsb_in(1'b0),
    .i_lsb_mode(1'b0), .i_inc(x_valid), .row_lsb_in(1'b0),
    .row_lsb_out(rla), .col_lsb_out(cla), .active(acta)
  );

  dsap_module #(.KIND(TR_HAAR), .N(N), .DW(DW), .CELLS(CELLS)) u_b (
    .clk, .rst, .x_in, .x_valid_in(x_valid), .y_out(yb), .y_valid_out(yvb), .y_index_out(ib),
    .x_out(xb), .x_valid_out(xvb), .y_in('0), .y_valid_in(x_valid),
    .j_lsb_mode(1'b1), .j_inc(1'b0), .col_lsb_in(col_lsb),
    .i_lsb_mode(1'b1), .i_inc(1'b0), .row_lsb_in(row_lsb),
    .row_lsb_out(rlb), .col_lsb_out(clb), .active(actb)
  );

  int checks = 0, failures = 0;
  int xs [FRAMES*NN];
  longint t_in [FRAMES*NN];
  longint cycle = 0;
  int out_a = 0, out_b = 0, n_x_out = 0;
  bit done = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // stimulus: element e = f*n + j at clock 2e; index LSB = e[0]
  initial begin
    x_in = '0; x_valid = 1'b0; col_lsb = 1'b0; row_lsb = 1'b0;
    for (int e = 0; e < FRAMES*NN; e++)
      xs[e] = int'($urandom_range(255)) - 128;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int e = 0; e < FRAMES*NN; e++) begin
      x_in = DW'(xs[e]); x_valid = 1'b1;
      col_lsb = e[0]; row_lsb = e[0];
      t_in[e] = cycle;
      @(negedge clk);
      x_in = '0; x_valid = 1'b0;
      @(negedge clk);
    end
  end

  task automatic check_y(string who, int k, logic signed [DW+N-1:0] y, logic [N:0] idx,
                         logic rlsb);
    automatic int f = k / NN, i = k % NN;
    automatic int expv = 0;
    for (int j = 0; j < NN; j++) expv += coef(1'b0, N, i, j) * xs[f*NN + j];
    checks += 4;
    if (int'(y) != expv) begin
      failures++;
      $display("FAIL %s frame %0d row %0d: %0d expected %0d", who, f, i, y, expv);
    end
    if (int'(idx[N-1:0]) != i || idx[N] != f[0]) begin
      failures++;
      $display("FAIL %s frame %0d row %0d: index %0h", who, f, i, idx);
    end
    if (rlsb != idx[0]) begin
      failures++;
      $display("FAIL %s row LSB output", who);
    end
    if (cycle != t_in[f*NN] + 2*i + CELLS) begin
      failures++;
      $display("FAIL %s frame %0d row %0d: at clock %0d", who, f, i, cycle);
    end
  endtask

  always @(negedge clk) begin
    if (!rst) begin
      if (yva && out_a < FRAMES*NN) begin check_y("A", out_a, ya, ia, rla); out_a++; end
      if (yvb && out_b < FRAMES*NN) begin check_y("B", out_b, yb, ib, rlb); out_b++; end
      if (xva && n_x_out < FRAMES*NN) begin
        checks++;
        if (int'(xa) != xs[n_x_out] || xb != xa || !xvb || cla != n_x_out[0] || clb != cla
            || cycle != t_in[n_x_out] + CELLS) begin
          failures++;
          $display("FAIL right end, element %0d", n_x_out);
        end
        n_x_out++;
      end
      if (out_a == FRAMES*NN && out_b == FRAMES*NN && !done) begin
        done = 1;
        checks++;
        if (n_x_out != FRAMES*NN) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
