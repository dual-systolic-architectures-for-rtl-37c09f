// dsap_ternary_case: one dsap_ternary configuration paired with a stream checker,
// for the end-to-end testbench. Reports the checker's counts on its
// outputs once all transforms have come out.
module dsap_ternary_case
  import dsap_pkg::*;
#(
  parameter transform_e  KIND    = TR_HAAR,
  parameter int unsigned N       = 3,
  parameter int unsigned DW      = 8,
  parameter int unsigned MODULES = 1,
  parameter int unsigned FRAMES  = 8
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_back_to_back,
  output int   n_gapped,
  output int   n_add,
  output int   n_sub,
  output int   n_nop,
  output int   n_full_util,
  output int   n_lsb_steps        // index advances rebuilt from a neighbour's LSB
);
  localparam int unsigned CELLS = (2 * (2**N) - 1 + MODULES - 1) / MODULES;
  localparam int unsigned TOTAL = MODULES * CELLS;

  logic signed [DW-1:0]   x_in, x_out;
  logic                   x_valid, x_out_valid;
  logic signed [DW+N-1:0] y_out;
  logic                   y_valid, y_frame, row_lsb_out, col_lsb_out;
  logic [N-1:0]           y_row;
  logic [TOTAL-1:0]       active_cells;

  dsap_ternary #(.KIND(KIND), .N(N), .DW(DW), .MODULES(MODULES)) u_dut (
    .clk, .rst, .x_in, .x_valid, .y_out, .y_valid, .y_row, .y_frame,
    .x_out, .x_out_valid, .row_lsb_out, .col_lsb_out, .active_cells
  );

  dsap_stream_checker #(.WALSH(KIND == TR_WALSH), .N(N), .DW(DW), .TOTAL(TOTAL),
                        .FRAMES(FRAMES)) u_chk (
    .clk, .rst, .x_in, .x_valid, .y_out, .y_valid, .y_row, .y_frame, .active_cells,
    .done, .checks, .failures, .n_back_to_back, .n_gapped, .n_add, .n_sub, .n_nop,
    .n_full_util
  );

  // The index LSBs crossing between modules: each change is one index
  // advance that the next module's counter must rebuild.
  logic prev_col0;
  initial n_lsb_steps = 0;
  if (MODULES > 1) begin : g_cascade
    always @(negedge clk) begin
      if (!rst && u_dut.mcol[0] != prev_col0) n_lsb_steps++;
      prev_col0 <= u_dut.mcol[0];
    end
  end
endmodule
