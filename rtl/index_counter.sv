// index_counter: row or column index counter at one end of a DSAP module.
//
// The counter produces the index stream that enters the array beside the
// data stream. It works in one of two modes (selected by lsb_mode):
//  - clock increment (lsb_mode = 0): the count advances after every clock
//    in which inc is high; the array's controller pulses inc once per
//    element, i.e. every second clock.
//  - LSB increment (lsb_mode = 1): used when modules are cascaded. The
//    counter watches the LSB of the index leaving the preceding module and
//    advances whenever that bit changes. Only one wire then joins the
//    modules' index paths, yet the full index is rebuilt locally.
// In LSB mode the output reacts combinationally to lsb_in, so the rebuilt
// index lines up with the data that left the preceding module in the same
// cycle; in clock mode the output is the register itself.
// The width W includes the frame bit above the N index bits, so the
// counter wraps once per transform and toggles the frame bit.
module index_counter #(
  parameter int unsigned W = 4     // N index bits + 1 frame bit
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         lsb_mode,   // 0: clock increment, 1: LSB increment
  input  logic         inc,        // clock mode: advance after this cycle
  input  logic         lsb_in,     // LSB mode: preceding module's index LSB
  output logic [W-1:0] idx
);
  logic [W-1:0] count;
  logic         lsb_seen;
  logic [W-1:0] next;

  always_comb begin
    if (lsb_mode)
      next = (lsb_in != lsb_seen) ? count + 1'b1 : count;
    else
      next = inc ? count + 1'b1 : count;
    idx = lsb_mode ? next : count;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= '0;
      lsb_seen <= 1'b0;
    end else begin
      count    <= next;
      lsb_seen <= lsb_in;
    end
  end
endmodule
