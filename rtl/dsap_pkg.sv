// dsap_pkg: types and helpers shared by the dual systolic array processor.
//
// The coefficient that a matrix element coprocessor hands to its inner
// product step processor is a two-bit ternary control word V = [v1, v0]
// (Table I of the design): v0 = 0 means NOP (coefficient 0), v0 = 1 with
// v1 = 0 means ADD (+1), v0 = 1 with v1 = 1 means SUB (-1). v1 is a don't
// care whenever v0 = 0. The DFT extension adds the control word a_j.
// The transform family selects the two
// problem-dependent cells (w and alpha) of every common function block.
package dsap_pkg;

  // Recursion rule implemented by cells (2) and (3) of each function block.
  typedef enum logic [0:0] {
    TR_HAAR  = 1'b0,  // [H^k] = [H H ; I -I]
    TR_WALSH = 1'b1   // [W^k] = [W W ; W -W]
  } transform_e;

  // Ternary control word of Table I.
  typedef struct packed {
    logic v1;  // sign: 1 = negative
    logic v0;  // magnitude: 1 = nonzero
  } ctrl_t;

  localparam ctrl_t CTRL_ADD = '{v1: 1'b0, v0: 1'b1};
  localparam ctrl_t CTRL_SUB = '{v1: 1'b1, v0: 1'b1};
  localparam ctrl_t CTRL_NOP = '{v1: 1'b0, v0: 1'b0};

  // Control word a_j of the DFT coefficient array: marks where the input
  // vector starts and continues (a_j in {0, 1, 2}).
  typedef enum logic [1:0] {
    A_NONE  = 2'd0,   // no element: coefficient 0
    A_FIRST = 2'd1,   // first element x_0: coefficient omega^0 = 1
    A_NEXT  = 2'd2    // later element: coefficient passed in from the right
  } actrl_e;

  // Coefficient value (-1, 0, +1) a control word stands for.
  function automatic int ctrl_value(ctrl_t c);
    if (!c.v0) return 0;
    return c.v1 ? -1 : 1;
  endfunction

endpackage
