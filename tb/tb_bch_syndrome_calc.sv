// tb_bch_syndrome_calc: checks the 4-parallel syndrome calculator against
// syndromes computed bit by bit with the reference model.
//
// Random received words (not codewords, so the syndromes are non-zero) and
// codewords with injected errors are sent back to back and with gaps. In the
// cycle after the last word syn_valid must be high and S1, S3, S5 must equal
// r(alpha), r(alpha^3), r(alpha^5); in every other cycle the outputs must be
// zero.
module tb_bch_syndrome_calc;
  import bch_pkg::*;
  import bch_tb_pkg::*;

  localparam int P = 4;
  localparam int W = 1020 / P;
  localparam int NCW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  logic [P-1:0] data = '0;
  syn_t syn;
  logic syn_valid;

  always #1 clk = ~clk;

  bch_syndrome_calc #(.P(P)) dut (.*);

  int checks = 0, failures = 0;
  cw_t r [NCW];
  int  cw_done = 0;

  initial begin
    tb_init();
    for (int c = 0; c < NCW; c++) begin
      if (c % 2 == 0) for (int j = 0; j < TN; j++) r[c][j] = 1'($urandom);
      else            r[c] = tb_random_codeword() ^ tb_error_pattern(c % 4);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int c = 0; c < NCW; c++) begin
      for (int w = 0; w < W; w++) begin
        in_valid = 1'b1;
        in_first = (w == 0);
        in_last  = (w == W - 1);
        data     = r[c][TN - P*(w+1) +: P];
        @(negedge clk);
      end
      if (c % 3 == 1) begin
        in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
        data = 4'($urandom);
        repeat (5) @(negedge clk);
      end
    end
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (cw_done != NCW) begin
      failures++;
      $display("only %0d syndrome sets seen", cw_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (syn_valid) begin
        int e1, e3, e5;
        e1 = tb_syndrome(r[cw_done], 1);
        e3 = tb_syndrome(r[cw_done], 3);
        e5 = tb_syndrome(r[cw_done], 5);
        checks++;
        if (int'(syn.s1) != e1 || int'(syn.s3) != e3 || int'(syn.s5) != e5) begin
          failures++;
          $display("cw %0d: got %h %h %h expected %h %h %h", cw_done,
                   syn.s1, syn.s3, syn.s5, e1, e3, e5);
        end
        cw_done <= cw_done + 1;
      end else begin
        checks++;
        if (syn != '0) failures++;
      end
    end
  end

  initial begin
    repeat (NCW * (W + 10) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
