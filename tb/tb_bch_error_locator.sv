// tb_bch_error_locator: checks the error locator with self-error detection.
//
// Sequences of Chien search values are generated with chosen zero lanes: a
// run whose first four values are all zero (no error in the codeword, so no
// bit may be corrected even where H is zero later) and runs with some zeros
// among the first four or later. One cycle after each input e must be the
// OR-reduced H XOR the reference bit (1 when the codeword is in error), and
// zero outside the active window.
module tb_bch_error_locator;
  import bch_pkg::*;

  localparam int P = 4;
  localparam int LEN = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, active = 1'b0;
  gf_t [P-1:0] h = '0;
  logic [P-1:0] e;
  logic e_valid;

  always #2 clk = ~clk;

  bch_error_locator #(.P(P)) dut (.*);

  int checks = 0, failures = 0;
  int n_ref0 = 0, n_ref1 = 0;

  initial begin
    logic [P-1:0] zero_mask, exp_e;
    logic ref_bit;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 12; run++) begin
      for (int c = 0; c < LEN; c++) begin
        load   = (c == 0);
        active = 1'b1;
        // choose which lanes are zero
        if (c == 0) zero_mask = (run % 3 == 0) ? '1 : P'($urandom_range(14, 0));
        else        zero_mask = ($urandom_range(3, 0) == 0) ? P'($urandom) : '0;
        for (int b = 0; b < P; b++)
          h[b] = zero_mask[b] ? gf_t'(0) : gf_t'($urandom_range(1023, 1));
        if (c == 0) begin
          ref_bit = ~&zero_mask;
          if (ref_bit) n_ref1++; else n_ref0++;
        end
        exp_e = ~zero_mask ^ {P{ref_bit}};
        @(negedge clk);
        checks++;
        if (!e_valid || e !== exp_e) begin
          failures++;
          $display("run %0d cycle %0d: e=%b expected %b", run, c, e, exp_e);
        end
      end
      load = 1'b0; active = 1'b0;
      h = '0;
      @(negedge clk);
      checks++;
      if (e_valid || e != '0) failures++;
      @(negedge clk);
    end
    checks++;
    if (n_ref0 == 0 || n_ref1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12 * (LEN + 2) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
