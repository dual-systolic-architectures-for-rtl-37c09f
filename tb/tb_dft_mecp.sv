// tb_dft_mecp: DFT coefficient coprocessor test with random inputs.
//
// Each clock it presents random a, b, frame bits and pass-chain input;
// one clock later, with a fresh random f_right, it checks the coefficient
// rule (a = 0: zero; a = 1: one if b != 0; a = 2: f_right), the frame
// compare, the vector registers, and one clock after that the pass
// register holding f * b (exponents added modulo n). n = 8.
module tb_dft_mecp;
  import dsap_pkg::*;

  localparam int N = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  actrl_e       a_in, a_q;
  logic         af_in, af_q, bnz_in, bf_in, bnz_q, bf_q, fnz_in, fnz_q, f_nz, en;
  logic [N-1:0] bex_in, bex_q, fex_in, fex_q, f_exp;

  dft_mecp #(.N(N)) u_dut (
    .clk, .rst, .a_in, .a_frame_in(af_in), .a_q, .a_frame_q(af_q),
    .b_nz_in(bnz_in), .b_exp_in(bex_in), .b_frame_in(bf_in),
    .b_nz_q(bnz_q), .b_exp_q(bex_q), .b_frame_q(bf_q),
    .f_nz_in(fnz_in), .f_exp_in(fex_in), .f_nz_q(fnz_q), .f_exp_q(fex_q),
    .f_nz, .f_exp, .en
  );

  int checks = 0, failures = 0;
  int n_first = 0, n_next = 0, n_none = 0;

  initial begin
    automatic int ra, rb_nz, rb_exp, raf, rbf;
    automatic int prev_nz = 0, prev_exp = 0;
    a_in = A_NONE; af_in = 0; bnz_in = 0; bex_in = '0; bf_in = 0; fnz_in = 0; fex_in = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 1500; k++) begin
      automatic int ev_nz, ev_exp;
      ra = $urandom_range(2); rb_nz = $urandom_range(3) != 0; rb_exp = $urandom_range(7);
      raf = $urandom_range(1); rbf = $urandom_range(1);
      a_in = actrl_e'(ra); af_in = 1'(raf);
      bnz_in = 1'(rb_nz); bex_in = N'(rb_exp); bf_in = 1'(rbf);
      @(negedge clk);
      // the pass register now holds the product formed in the last clock
      if (k > 0) begin
        checks++;
        if (int'(fnz_q) != prev_nz || (prev_nz != 0 && int'(fex_q) != prev_exp)) begin
          failures++;
          $display("FAIL pass register %0d/%0d expected %0d/%0d", fnz_q, fex_q, prev_nz, prev_exp);
        end
      end
      fnz_in = 1'($urandom); fex_in = N'($urandom);
      a_in = A_NONE; bnz_in = 0; bex_in = '0;      // next inputs, not yet loaded
      #1;
      case (ra)
        1: begin ev_nz = rb_nz; ev_exp = 0; n_first++; end
        2: begin ev_nz = fnz_in; ev_exp = fex_in; n_next++; end
        default: begin ev_nz = 0; ev_exp = 0; n_none++; end
      endcase
      checks += 3;
      if (int'(f_nz) != ev_nz || (ev_nz != 0 && int'(f_exp) != ev_exp)) begin
        failures++;
        $display("FAIL a=%0d b=%0d/%0d: f=%0d/%0d expected %0d/%0d", ra, rb_nz, rb_exp,
                 f_nz, f_exp, ev_nz, ev_exp);
      end
      if (en != (raf == rbf)) begin
        failures++;
        $display("FAIL frame compare");
      end
      if (int'(a_q) != ra || int'(bnz_q) != rb_nz || int'(bex_q) != rb_exp
          || int'(af_q) != raf || int'(bf_q) != rbf) begin
        failures++;
        $display("FAIL vector registers");
      end
      prev_nz  = ev_nz & rb_nz;
      prev_exp = (ev_exp + rb_exp) % 8;
    end
    checks++;
    if (n_first == 0 || n_next == 0 || n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
