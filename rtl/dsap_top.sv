// dsap_top: the dual systolic array processors side by side.
//
//  - h_*: a Haar processor (dsap_ternary with the Haar recursion cells),
//    n = 2^H_N = 8 by default, the order of the worked Haar example.
//  - w_*: a Walsh processor (dsap_ternary with the Walsh recursion cells),
//    n = 2^W_N = 16 by default, the order of the reduced Walsh
//    coprocessor that is drawn for this transform.
//    In both, each coprocessor derives its coefficient from the row and
//    column index bits; either may be split over several cascaded
//    modules (H_MODULES, W_MODULES).
//  - f_*: the DFT extension (dft_dsap), whose coprocessors rebuild
//    omega^(i*j) from a control vector and a root vector crossing the
//    array; n = 2^F_N = 4.
// The processors share only the clock and reset; placing them in one top
// is this design's choice. Each takes one input element every second
// clock and returns results in row order at the left end of its array,
// the first 2n - 1 clocks after its first input (one clock later if the
// total cell count is even); see the modules for exact timing.
module dsap_top
  import dsap_pkg::*;
#(
  parameter int unsigned H_N       = 3,
  parameter int unsigned H_DW      = 8,
  parameter int unsigned H_MODULES = 1,
  parameter int unsigned H_CELLS   = (2 * (2**H_N) - 1 + H_MODULES - 1) / H_MODULES,
  parameter int unsigned W_N       = 4,
  parameter int unsigned W_DW      = 8,
  parameter int unsigned W_MODULES = 1,
  parameter int unsigned W_CELLS   = (2 * (2**W_N) - 1 + W_MODULES - 1) / W_MODULES,
  parameter int unsigned F_N       = 2,
  parameter int unsigned F_DW      = 8,
  parameter int unsigned F_TW      = 12
) (
  input  logic                          clk,
  input  logic                          rst,
  // Haar processor
  input  logic signed [H_DW-1:0]        h_x_in,
  input  logic                          h_x_valid,
  output logic signed [H_DW+H_N-1:0]    h_y_out,
  output logic                          h_y_valid,
  output logic [H_N-1:0]                h_y_row,
  output logic                          h_y_frame,
  output logic signed [H_DW-1:0]        h_x_out,
  output logic                          h_x_out_valid,
  output logic                          h_row_lsb_out,
  output logic                          h_col_lsb_out,
  output logic [H_MODULES*H_CELLS-1:0]  h_active_cells,
  // Walsh processor
  input  logic signed [W_DW-1:0]        w_x_in,
  input  logic                          w_x_valid,
  output logic signed [W_DW+W_N-1:0]    w_y_out,
  output logic                          w_y_valid,
  output logic [W_N-1:0]                w_y_row,
  output logic                          w_y_frame,
  output logic signed [W_DW-1:0]        w_x_out,
  output logic                          w_x_out_valid,
  output logic                          w_row_lsb_out,
  output logic                          w_col_lsb_out,
  output logic [W_MODULES*W_CELLS-1:0]  w_active_cells,
  // DFT processor
  input  logic signed [F_DW-1:0]        f_x_re,
  input  logic signed [F_DW-1:0]        f_x_im,
  input  logic                          f_x_valid,
  output logic signed [F_DW+F_N:0]      f_y_re,
  output logic signed [F_DW+F_N:0]      f_y_im,
  output logic                          f_y_valid,
  output logic [F_N-1:0]                f_y_row,
  output logic                          f_y_frame,
  output logic [2*(2**F_N)-2:0]         f_active_cells
);
  dsap_ternary #(
    .KIND(TR_HAAR), .N(H_N), .DW(H_DW), .MODULES(H_MODULES), .CELLS(H_CELLS)
  ) u_haar (
    .clk, .rst,
    .x_in         (h_x_in),
    .x_valid      (h_x_valid),
    .y_out        (h_y_out),
    .y_valid      (h_y_valid),
    .y_row        (h_y_row),
    .y_frame      (h_y_frame),
    .x_out        (h_x_out),
    .x_out_valid  (h_x_out_valid),
    .row_lsb_out  (h_row_lsb_out),
    .col_lsb_out  (h_col_lsb_out),
    .active_cells (h_active_cells)
  );

  dsap_ternary #(
    .KIND(TR_WALSH), .N(W_N), .DW(W_DW), .MODULES(W_MODULES), .CELLS(W_CELLS)
  ) u_walsh (
    .clk, .rst,
    .x_in         (w_x_in),
    .x_valid      (w_x_valid),
    .y_out        (w_y_out),
    .y_valid      (w_y_valid),
    .y_row        (w_y_row),
    .y_frame      (w_y_frame),
    .x_out        (w_x_out),
    .x_out_valid  (w_x_out_valid),
    .row_lsb_out  (w_row_lsb_out),
    .col_lsb_out  (w_col_lsb_out),
    .active_cells (w_active_cells)
  );

  dft_dsap #(.N(F_N), .DW(F_DW), .TW(F_TW)) u_dft (
    .clk, .rst,
    .x_re    (f_x_re),
    .x_im    (f_x_im),
    .x_valid (f_x_valid),
    .y_re    (f_y_re),
    .y_im    (f_y_im),
    .y_valid (f_y_valid),
    .y_row   (f_y_row),
    .y_frame (f_y_frame),
    .active  (f_active_cells)
  );
endmodule
