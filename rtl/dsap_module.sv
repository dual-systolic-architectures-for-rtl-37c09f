// dsap_module: one dual systolic array module (the Fig. 2 arrangement).
//
// A row of CELLS identical cells. Each cell pairs a matrix element
// coprocessor (mecp, upper array) with an inner product step processor
// (ipsp, lower array, the "backbone"). Input elements x_j enter at the
// left and move right one cell per clock, together with their column index
// j; partial sums y_i enter at the right (0 for a lone module) and move
// left one cell per clock, together with their row index i. Where y_i and
// x_j meet, the cell's MECP computes t_ij from (i, j) and its IPSP adds,
// subtracts or skips x_j. Only the two index streams enter the coefficient
// array, so the I/O per element is constant instead of a column of
// coefficients per step.
//
// The column counter sits at the left end and the row counter at the
// right end. Each can count clock strobes (j_inc / i_inc) or, when the
// module is one of a cascade, follow the index LSB leaving the
// neighbouring module (col_lsb_in / row_lsb_in). The LSBs of the indexes
// leaving this module are brought out (row_lsb_out at the left end,
// col_lsb_out at the right end) for the next module in the cascade.
//
// Timing: every register in the array loads on every clock, there are no
// stalls. x, y and the indexes take one clock per cell. Elements must be
// presented every second clock so that each y_i meets every x_j of its
// transform (the empty slots in between only meet each other).
module dsap_module
  import dsap_pkg::*;
#(
  parameter transform_e  KIND  = TR_HAAR,
  parameter int unsigned N     = 3,             // log2 of the matrix order
  parameter int unsigned DW    = 8,             // data width of x
  parameter int unsigned CELLS = 2 * (2**N) - 1 // cells in this module
) (
  input  logic                    clk,
  input  logic                    rst,
  // backbone, left end
  input  logic signed [DW-1:0]    x_in,
  input  logic                    x_valid_in,
  output logic signed [DW+N-1:0]  y_out,
  output logic                    y_valid_out,
  output logic [N:0]              y_index_out,   // row index with frame bit
  // backbone, right end
  output logic signed [DW-1:0]    x_out,
  output logic                    x_valid_out,
  input  logic signed [DW+N-1:0]  y_in,
  input  logic                    y_valid_in,
  // column counter (left end)
  input  logic                    j_lsb_mode,
  input  logic                    j_inc,
  input  logic                    col_lsb_in,
  // row counter (right end)
  input  logic                    i_lsb_mode,
  input  logic                    i_inc,
  input  logic                    row_lsb_in,
  // index LSBs for the cascade
  output logic                    row_lsb_out,
  output logic                    col_lsb_out,
  // cells taking a step this clock
  output logic [CELLS-1:0]        active
);
  // Signals between cells; index p is the signal leaving cell p
  // (rightwards for x/j, leftwards for y/i).
  logic signed [DW-1:0]   x_r  [CELLS];
  logic                   xv_r [CELLS];
  logic [N:0]             j_r  [CELLS];
  logic signed [DW+N-1:0] y_l  [CELLS];
  logic                   yv_l [CELLS];
  logic [N:0]             i_l  [CELLS];

  logic [N:0] j_start, i_start;

  index_counter #(.W(N+1)) u_col_counter (
    .clk, .rst,
    .lsb_mode (j_lsb_mode),
    .inc      (j_inc),
    .lsb_in   (col_lsb_in),
    .idx      (j_start)
  );

  index_counter #(.W(N+1)) u_row_counter (
    .clk, .rst,
    .lsb_mode (i_lsb_mode),
    .inc      (i_inc),
    .lsb_in   (row_lsb_in),
    .idx      (i_start)
  );

  for (genvar p = 0; p < CELLS; p++) begin : g_cell
    logic signed [DW-1:0]   x_from_left;
    logic                   xv_from_left;
    logic [N:0]             j_from_left;
    logic signed [DW+N-1:0] y_from_right;
    logic                   yv_from_right;
    logic [N:0]             i_from_right;
    ctrl_t                  t_ij;
    logic                   same_frame;

    if (p == 0) begin : g_left_end
      always_comb begin
        x_from_left  = x_in;
        xv_from_left = x_valid_in;
        j_from_left  = j_start;
      end
    end else begin : g_left_cell
      always_comb begin
        x_from_left  = x_r[p-1];
        xv_from_left = xv_r[p-1];
        j_from_left  = j_r[p-1];
      end
    end

    if (p == CELLS - 1) begin : g_right_end
      always_comb begin
        y_from_right  = y_in;
        yv_from_right = y_valid_in;
        i_from_right  = i_start;
      end
    end else begin : g_right_cell
      always_comb begin
        y_from_right  = y_l[p+1];
        yv_from_right = yv_l[p+1];
        i_from_right  = i_l[p+1];
      end
    end

    mecp #(.KIND(KIND), .N(N)) u_mecp (
      .clk, .rst,
      .i_in       (i_from_right),
      .j_in       (j_from_left),
      .i_q        (i_l[p]),
      .j_q        (j_r[p]),
      .t_ij       (t_ij),
      .same_frame (same_frame)
    );

    ipsp #(.DW(DW), .N(N)) u_ipsp (
      .clk, .rst,
      .x_in        (x_from_left),
      .x_valid_in  (xv_from_left),
      .y_in        (y_from_right),
      .y_valid_in  (yv_from_right),
      .t_ij        (t_ij),
      .en          (same_frame),
      .x_out       (x_r[p]),
      .x_valid_out (xv_r[p]),
      .y_out       (y_l[p]),
      .y_valid_out (yv_l[p]),
      .active      (active[p])
    );
  end

  always_comb begin
    y_out       = y_l[0];
    y_valid_out = yv_l[0];
    y_index_out = i_l[0];
    row_lsb_out = i_l[0][0];
    x_out       = x_r[CELLS-1];
    x_valid_out = xv_r[CELLS-1];
    col_lsb_out = j_r[CELLS-1][0];
  end
endmodule
