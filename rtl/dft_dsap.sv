// dft_dsap: dual systolic array for the n-point discrete Fourier transform
// y = F x, F = [omega^(i*j)], omega = exp(-2*pi*j/n) (Sec. VI extension).
//
// The backbone is the same as in the Haar/Walsh array: 2n - 1 cells, x_j
// entering at the left every second clock and moving right, partial sums
// y_i (starting at 0) entering at the right in step with x and moving
// left, so that y_i meets x_j in cell n - 1 + i - j. The upper array
// (dft_mecp) no longer receives indexes: the control vector a enters at
// the left beside x (a_0 = 1, a_j = 2 after it, 0 when idle) and the root
// vector b enters at the right beside y (b_i = omega^i, 0 when idle), each
// value held for two clocks, i.e. at half the element rate. Together they
// rebuild omega^(i*j) in the cell where x_j meets y_i.
//
// Interface: complex x_j on x_re/x_im with x_valid, at most every second
// clock; transforms may follow each other with no gap. y_i leaves the
// left end in row order with y_valid and y_row = i, 2i + 2n - 1 clocks
// after x_0. The a and b generators are this design's: they follow the
// vectors the document gives for n = 4, a = [1 2 2 2], b = [1 w w^2 w^3].
module dft_dsap
  import dsap_pkg::*;
#(
  parameter int unsigned N     = 2,            // n = 2^N
  parameter int unsigned DW    = 8,
  parameter int unsigned TW    = 12,
  parameter int unsigned CELLS = 2 * (2**N) - 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [DW-1:0]  x_re,
  input  logic signed [DW-1:0]  x_im,
  input  logic                  x_valid,
  output logic signed [DW+N:0]  y_re,
  output logic signed [DW+N:0]  y_im,
  output logic                  y_valid,
  output logic [N-1:0]          y_row,
  output logic                  y_frame,
  output logic [CELLS-1:0]      active
);
  // ---- vector generators: each value is held for two clocks ----------
  logic [N:0] col_cnt, row_cnt;     // element and slot counters with frame bit
  actrl_e     a_now, a_held, a_gen;
  logic       af_now, af_held, a_gen_frame;
  logic       b_nz_held, bf_held, b_gen_nz, b_gen_frame;
  logic [N-1:0] b_exp_held, b_gen_exp;

  always_comb begin
    a_now  = (col_cnt[N-1:0] == '0) ? A_FIRST : A_NEXT;
    af_now = col_cnt[N];
    if (x_valid) begin
      a_gen       = a_now;
      a_gen_frame = af_now;
      b_gen_nz    = 1'b1;
      b_gen_exp   = row_cnt[N-1:0];
      b_gen_frame = row_cnt[N];
    end else begin
      a_gen       = a_held;
      a_gen_frame = af_held;
      b_gen_nz    = b_nz_held;
      b_gen_exp   = b_exp_held;
      b_gen_frame = bf_held;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      col_cnt    <= '0;
      row_cnt    <= '0;
      a_held     <= A_NONE;
      af_held    <= 1'b0;
      b_nz_held  <= 1'b0;
      b_exp_held <= '0;
      bf_held    <= 1'b0;
    end else begin
      if (x_valid) begin
        col_cnt    <= col_cnt + 1'b1;
        row_cnt    <= row_cnt + 1'b1;
        a_held     <= a_now;
        af_held    <= af_now;
        b_nz_held  <= 1'b1;
        b_exp_held <= row_cnt[N-1:0];
        bf_held    <= row_cnt[N];
      end else begin
        a_held     <= A_NONE;
        b_nz_held  <= 1'b0;
      end
    end
  end

  // ---- the array -------------------------------------------------------
  actrl_e               a_r   [CELLS];
  logic                 af_r  [CELLS];
  logic                 bnz_l [CELLS];
  logic [N-1:0]         bex_l [CELLS];
  logic                 bf_l  [CELLS];
  logic                 fnz_l [CELLS];
  logic [N-1:0]         fex_l [CELLS];
  logic signed [DW-1:0] xr_r  [CELLS];
  logic signed [DW-1:0] xi_r  [CELLS];
  logic                 xv_r  [CELLS];
  logic signed [DW+N:0] yr_l  [CELLS];
  logic signed [DW+N:0] yi_l  [CELLS];
  logic                 yv_l  [CELLS];

  for (genvar p = 0; p < CELLS; p++) begin : g_cell
    actrl_e               a_in;
    logic                 af_in, bnz_in, bf_in, fnz_in, xv_in, yv_in;
    logic [N-1:0]         bex_in, fex_in;
    logic signed [DW-1:0] xr_in, xi_in;
    logic signed [DW+N:0] yr_in, yi_in;
    logic                 f_nz, en;
    logic [N-1:0]         f_exp;

    if (p == 0) begin : g_left_end
      always_comb begin
        a_in = a_gen; af_in = a_gen_frame;
        xr_in = x_re; xi_in = x_im; xv_in = x_valid;
      end
    end else begin : g_left_cell
      always_comb begin
        a_in = a_r[p-1]; af_in = af_r[p-1];
        xr_in = xr_r[p-1]; xi_in = xi_r[p-1]; xv_in = xv_r[p-1];
      end
    end

    if (p == CELLS - 1) begin : g_right_end
      always_comb begin
        bnz_in = b_gen_nz; bex_in = b_gen_exp; bf_in = b_gen_frame;
        fnz_in = 1'b0; fex_in = '0;              // 0 enters the pass chain
        yr_in = '0; yi_in = '0; yv_in = x_valid; // empty partial sums
      end
    end else begin : g_right_cell
      always_comb begin
        bnz_in = bnz_l[p+1]; bex_in = bex_l[p+1]; bf_in = bf_l[p+1];
        fnz_in = fnz_l[p+1]; fex_in = fex_l[p+1];
        yr_in = yr_l[p+1]; yi_in = yi_l[p+1]; yv_in = yv_l[p+1];
      end
    end

    dft_mecp #(.N(N)) u_mecp (
      .clk, .rst,
      .a_in, .a_frame_in(af_in), .a_q(a_r[p]), .a_frame_q(af_r[p]),
      .b_nz_in(bnz_in), .b_exp_in(bex_in), .b_frame_in(bf_in),
      .b_nz_q(bnz_l[p]), .b_exp_q(bex_l[p]), .b_frame_q(bf_l[p]),
      .f_nz_in(fnz_in), .f_exp_in(fex_in), .f_nz_q(fnz_l[p]), .f_exp_q(fex_l[p]),
      .f_nz, .f_exp, .en
    );

    dft_ipsp #(.N(N), .DW(DW), .TW(TW)) u_ipsp (
      .clk, .rst,
      .x_re_in(xr_in), .x_im_in(xi_in), .x_valid_in(xv_in),
      .y_re_in(yr_in), .y_im_in(yi_in), .y_valid_in(yv_in),
      .f_nz, .f_exp, .en,
      .x_re_out(xr_r[p]), .x_im_out(xi_r[p]), .x_valid_out(xv_r[p]),
      .y_re_out(yr_l[p]), .y_im_out(yi_l[p]), .y_valid_out(yv_l[p]),
      .active(active[p])
    );
  end

  always_comb begin
    y_re    = yr_l[0];
    y_im    = yi_l[0];
    y_valid = yv_l[0];
    y_row   = bex_l[0];     // b_i travels with y_i: its exponent is i
    y_frame = bf_l[0];
  end

  a_x_spacing : assert property (@(posedge clk) disable iff (rst)
    x_valid |=> !x_valid)
    else $error("x_valid high in two consecutive clocks");
endmodule
