// ipsp: inner product step processor, the lower half of one array cell.
//
// Implements one step of y_i <- y_i + t_ij * x_j (eq. (1)) with
// t_ij in {-1, 0, +1}, so it only needs ADD, SUBTRACT and NO-OPERATION.
// The data register holds x_j (moving left to right) and the accumulation
// register holds the partial sum y_i (moving right to left). The
// accumulation register is N bits wider than the data register, enough for
// a sum of n = 2^N terms. Each register carries a valid bit marking a real
// element rather than one of the empty slots between elements.
//
// Timing: both registers load every clock from the neighbours. The
// outgoing partial sum y_out = y_reg + t * x_reg is combinational from the
// registers and is loaded by the left neighbour on the next edge. The step
// is taken only when the x slot is valid and en (same transform) is high.
module ipsp
  import dsap_pkg::*;
#(
  parameter int unsigned DW = 8,   // data register width
  parameter int unsigned N  = 3    // log2 of the matrix order
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [DW-1:0]    x_in,
  input  logic                    x_valid_in,
  input  logic signed [DW+N-1:0]  y_in,
  input  logic                    y_valid_in,
  input  ctrl_t                   t_ij,
  input  logic                    en,
  output logic signed [DW-1:0]    x_out,
  output logic                    x_valid_out,
  output logic signed [DW+N-1:0]  y_out,
  output logic                    y_valid_out,
  output logic                    active       // a step (ADD, SUB or NOP) this cycle
);
  logic signed [DW-1:0]   x_reg;
  logic                   x_vld;
  logic signed [DW+N-1:0] y_reg;
  logic                   y_vld;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_reg <= '0;
      x_vld <= 1'b0;
      y_reg <= '0;
      y_vld <= 1'b0;
    end else begin
      x_reg <= x_in;
      x_vld <= x_valid_in;
      y_reg <= y_in;
      y_vld <= y_valid_in;
    end
  end

  logic signed [DW+N-1:0] x_ext;

  always_comb begin
    x_ext  = {{N{x_reg[DW-1]}}, x_reg};
    active = x_vld & y_vld & en;
    if (!active || !t_ij.v0)
      y_out = y_reg;
    else if (t_ij.v1)
      y_out = y_reg - x_ext;
    else
      y_out = y_reg + x_ext;
    x_out       = x_reg;
    x_valid_out = x_vld;
    y_valid_out = y_vld;
  end
endmodule
