// tb_bch_cs_el: checks one channel's Chien search + error locator.
//
// For random error patterns of weight 0 to 3 over the 1020 positions, the
// syndromes and shared factors are computed with the reference model and
// loaded; over the 255 search cycles the error bits must reproduce the error
// pattern exactly, including errors in the first word, where the
// self-error detection takes its reference.
module tb_bch_cs_el;
  import bch_pkg::*;
  import bch_tb_pkg::*;

  localparam int P = 4;
  localparam int W = 1020 / P;
  localparam int NRUN = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, active = 1'b0;
  ssf_t ssf = '0;
  logic [P-1:0] e;
  logic e_valid;

  always #2 clk = ~clk;

  bch_cs_el #(.P(P), .NCODE(1020)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    cw_t err, got;
    int s1, s3, s5, s1sq, a, b, c, r;
    tb_init();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < NRUN; run++) begin
      err = tb_error_pattern(run % 4);
      if (run % 4 != 0 && run >= 8) begin
        err = tb_error_pattern(run % 4 - 1);
        while (err[TN - 1 - run % 4]) err = tb_error_pattern(run % 4 - 1);
        err[TN - 1 - run % 4] = 1'b1;
      end
      s1 = tb_syndrome(err, 1); s3 = tb_syndrome(err, 3); s5 = tb_syndrome(err, 5);
      tb_ssf(s1, s3, s5, s1sq, a, b, c, r);
      ssf.s1 = gf_t'(s1); ssf.s1sq = gf_t'(s1sq);
      ssf.a = gf_t'(a); ssf.b = gf_t'(b); ssf.c = gf_t'(c); ssf.r = gf_t'(r);
      got = '0;
      for (int w = 0; w < W; w++) begin
        load = (w == 0);
        active = 1'b1;
        @(negedge clk);
        if (w == 0) ssf = ssf_t'({$urandom, $urandom});
        got[TN - P*(w+1) +: P] = e;
        checks++;
        if (!e_valid) failures++;
      end
      load = 1'b0; active = 1'b0;
      @(negedge clk);
      checks++;
      if (got !== err) begin
        failures++;
        $display("run %0d (%0d errors): pattern mismatch", run, run % 4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUN * (W + 2) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
