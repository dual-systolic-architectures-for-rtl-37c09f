// tb_index_counter: index counter test in both modes.
//
// Clock mode: random inc strobes; the output must equal the number of
// strobes seen so far (mod 2^W), changing one clock after each strobe.
// LSB mode: the testbench keeps its own index that advances at random
// clocks and feeds only its LSB; the counter's output must equal that
// index in the same clock, including across the wrap of the frame bit.
module tb_index_counter;
  localparam int W = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         inc, lsb_in;
  logic [W-1:0] idx_clk, idx_lsb;

  index_counter #(.W(W)) u_clkmode (
    .clk, .rst, .lsb_mode(1'b0), .inc, .lsb_in(1'b0), .idx(idx_clk)
  );
  index_counter #(.W(W)) u_lsbmode (
    .clk, .rst, .lsb_mode(1'b1), .inc(1'b0), .lsb_in, .idx(idx_lsb)
  );

  int checks = 0, failures = 0, wraps = 0;
  int strobes = 0, ref_idx = 0;

  initial begin
    inc = 1'b0; lsb_in = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 600; k++) begin
      // clock mode: output counts strobes of earlier clocks
      checks++;
      if (int'(idx_clk) != strobes % (2**W)) begin
        failures++;
        $display("FAIL clock mode: %0d expected %0d", idx_clk, strobes % (2**W));
      end
      inc = 1'($urandom);
      if (inc) strobes++;
      // LSB mode: index follows the LSB in the same clock
      if ($urandom_range(2) == 0) begin
        ref_idx++;
        if (ref_idx % (2**W) == 0) wraps++;
      end
      lsb_in = ref_idx[0];
      #1;
      checks++;
      if (int'(idx_lsb) != ref_idx % (2**W)) begin
        failures++;
        $display("FAIL lsb mode: %0d expected %0d", idx_lsb, ref_idx % (2**W));
      end
      @(negedge clk);
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
