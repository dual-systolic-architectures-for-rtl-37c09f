// dsap_ternary: dual systolic array processor for y = T x, T a Haar or Walsh
// matrix of order n = 2^N.
//
// The array is MODULES dsap_module instances in a row (one by default; a
// cascade as in the document's Fig. 10 when larger). Together they hold
// MODULES * CELLS >= 2n - 1 cells. In the cascade only the leftmost column
// counter and the rightmost row counter count clock strobes; every other
// counter rebuilds its index from the index LSB leaving its neighbour.
//
// Interface: present x_0 .. x_{n-1} of a transform on x_in with x_valid
// high, one element every second clock (x_valid must never be high in two
// clocks in a row). Transforms may follow each other with no gap. The
// partial-sum slots entering the right end carry 0 and are released in
// step with x_valid, one clock later when the cell count is even, so that
// every y_i meets every x_j. Results leave the left end in row order:
// y_i appears on y_out with y_valid high and y_row = i, exactly
// 2i + MODULES*CELLS clocks after x_0 was presented (plus one when the
// cell count is even). One result every second clock is the throughput;
// the last result y_{n-1} of a transform appears 2(n - 1) + MODULES*CELLS
// clocks after its x_0 (4n - 3 with the minimal 2n - 1 cells).
// row_lsb_out and col_lsb_out are the index LSBs at the two open ends of
// the array, for cascading further chips; x_out passes the input vector on.
module dsap_ternary
  import dsap_pkg::*;
#(
  parameter transform_e  KIND    = TR_HAAR,
  parameter int unsigned N       = 3,     // order n = 2^N
  parameter int unsigned DW      = 8,     // width of an input element
  parameter int unsigned MODULES = 1,     // cascaded modules
  parameter int unsigned CELLS   = (2 * (2**N) - 1 + MODULES - 1) / MODULES
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic signed [DW-1:0]            x_in,
  input  logic                            x_valid,
  output logic signed [DW+N-1:0]          y_out,
  output logic                            y_valid,
  output logic [N-1:0]                    y_row,
  output logic                            y_frame,     // toggles per transform
  output logic signed [DW-1:0]            x_out,
  output logic                            x_out_valid,
  output logic                            row_lsb_out,
  output logic                            col_lsb_out,
  output logic [MODULES*CELLS-1:0]        active_cells
);
  localparam int unsigned TOTAL = MODULES * CELLS;
  localparam bit          EVEN  = (TOTAL % 2) == 0;

  // Partial-sum slot strobe at the right end.
  logic y_slot;
  if (EVEN) begin : g_even
    logic x_valid_d;
    always_ff @(posedge clk) begin
      if (rst) x_valid_d <= 1'b0;
      else     x_valid_d <= x_valid;
    end
    always_comb y_slot = x_valid_d;
  end else begin : g_odd
    always_comb y_slot = x_valid;
  end

  // Links between modules: index m is what leaves module m.
  logic signed [DW-1:0]   mx   [MODULES];
  logic                   mxv  [MODULES];
  logic signed [DW+N-1:0] my   [MODULES];
  logic                   myv  [MODULES];
  logic [N:0]             myi  [MODULES];
  logic                   mrow [MODULES];
  logic                   mcol [MODULES];

  for (genvar m = 0; m < MODULES; m++) begin : g_mod
    localparam bit LEFTMOST  = (m == 0);
    localparam bit RIGHTMOST = (m == MODULES - 1);

    logic signed [DW-1:0]   xi;
    logic                   xvi;
    logic signed [DW+N-1:0] yi;
    logic                   yvi;
    logic                   coli, rowi;

    always_comb begin
      xi   = LEFTMOST  ? x_in    : mx[LEFTMOST ? 0 : m-1];
      xvi  = LEFTMOST  ? x_valid : mxv[LEFTMOST ? 0 : m-1];
      coli = LEFTMOST  ? 1'b0    : mcol[LEFTMOST ? 0 : m-1];
      yi   = RIGHTMOST ? '0      : my[RIGHTMOST ? m : m+1];
      yvi  = RIGHTMOST ? y_slot  : myv[RIGHTMOST ? m : m+1];
      rowi = RIGHTMOST ? 1'b0    : mrow[RIGHTMOST ? m : m+1];
    end

    dsap_module #(.KIND(KIND), .N(N), .DW(DW), .CELLS(CELLS)) u_module (
      .clk, .rst,
      .x_in        (xi),
      .x_valid_in  (xvi),
      .y_out       (my[m]),
      .y_valid_out (myv[m]),
      .y_index_out (myi[m]),
      .x_out       (mx[m]),
      .x_valid_out (mxv[m]),
      .y_in        (yi),
      .y_valid_in  (yvi),
      .j_lsb_mode  (!LEFTMOST),
      .j_inc       (LEFTMOST ? x_valid : 1'b0),
      .col_lsb_in  (coli),
      .i_lsb_mode  (!RIGHTMOST),
      .i_inc       (RIGHTMOST ? y_slot : 1'b0),
      .row_lsb_in  (rowi),
      .row_lsb_out (mrow[m]),
      .col_lsb_out (mcol[m]),
      .active      (active_cells[m*CELLS +: CELLS])
    );
  end

  always_comb begin
    y_out       = my[0];
    y_valid     = myv[0];
    y_row       = myi[0][N-1:0];
    y_frame     = myi[0][N];
    x_out       = mx[MODULES-1];
    x_out_valid = mxv[MODULES-1];
    row_lsb_out = mrow[0];
    col_lsb_out = mcol[MODULES-1];
  end

  // Elements are spaced by one empty slot.
  a_x_spacing : assert property (@(posedge clk) disable iff (rst)
    x_valid |=> !x_valid)
    else $error("x_valid high in two consecutive clocks");

  initial begin
    assert (TOTAL >= 2 * (2**N) - 1)
      else $error("array needs at least 2n-1 cells");
    assert (TOTAL <= 2 * (2**N) + 2)
      else $error("array longer than the frame bit can separate");
  end
endmodule
