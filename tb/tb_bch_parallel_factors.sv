// tb_bch_parallel_factors: runs the decoder at the other parallel factors of
// the published complexity-versus-parallelism comparison (2 to 12).
//
// One two-channel decoder is built for every factor in that range that
// divides the code length 1020 (2, 3, 5, 6, 10, 12; factor 4 has its own
// tests), and for 7 and 11 with the codeword zero-extended to 1022 and 1023
// bits. Each decodes eight codewords per channel with 0 to 3 errors,
// checking every output bit and the latency. Factors 2 and 3 exercise the
// multi-cycle reference of the error locator. Factors 8 and 9 would need a
// length above 1023 and are not built. Fails if any decoder never saw a
// codeword with 0, 1, 2 or 3 errors.
module tb_bch_parallel_factors;
  import bch_tb_pkg::*;

  localparam int NP = 8;
  localparam int PF [NP] = '{2, 3, 5, 6, 7, 10, 11, 12};
  localparam int NL [NP] = '{1020, 1020, 1020, 1020, 1022, 1020, 1023, 1020};

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic done [NP];
  int   chk  [NP];
  int   fail [NP];
  int   nerr [NP][4];

  for (genvar i = 0; i < NP; i++) begin : g_p
    bch_pf_check #(.P(PF[i]), .CH(2), .NCW(8), .NC(NL[i])) u_chk (
      .clk      (clk),
      .rst_n    (rst_n),
      .done     (done[i]),
      .checks   (chk[i]),
      .failures (fail[i]),
      .n_err    (nerr[i])
    );
  end

  int checks = 0, failures = 0;

  initial begin
    tb_init();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NP; i++) wait (done[i]);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NP; i++) begin
      $display("P=%0d: %0d checks, %0d failures, codewords with 0/1/2/3 errors: %0d/%0d/%0d/%0d",
               PF[i], chk[i], fail[i], nerr[i][0], nerr[i][1], nerr[i][2], nerr[i][3]);
      checks   += chk[i];
      failures += fail[i];
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (nerr[i][k] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * (1020 / 2 + 20) + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
