// tb_bch_chien_search: checks the 4-parallel Chien search.
//
// For random factor sets, in both cases (C = S1^3 + S3 zero and non-zero),
// the block is loaded and run for the 255 cycles of a codeword; in cycle c
// lane b must equal R + A alpha^j + B alpha^2j + C alpha^3j at position
// j = 1020 - 4(c+1) + b, with A, B, C, R chosen by the case rule of the
// m-SBS algorithm and evaluated with the reference model. The inputs are
// scrambled after the load cycle to show that the block keeps what it loaded.
module tb_bch_chien_search;
  import bch_pkg::*;
  import bch_tb_pkg::*;

  localparam int P = 4;
  localparam int W = 1020 / P;

  logic clk = 1'b0;
  logic load = 1'b0;
  ssf_t ssf = '0;
  gf_t [P-1:0] h;

  always #2 clk = ~clk;

  bch_chien_search #(.P(P), .NCODE(1020)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    int ca, cb, cc, cr;
    tb_init();
    for (int t = 0; t < 6; t++) begin
      ssf = ssf_t'({$urandom, $urandom});
      if (t % 2 == 1) ssf.c = '0;
      if (ssf.c == '0) begin
        ca = int'(ssf.s1sq); cb = int'(ssf.s1); cc = 0; cr = 0;
      end else begin
        ca = int'(ssf.a); cb = int'(ssf.b); cc = int'(ssf.c); cr = int'(ssf.r);
      end
      @(negedge clk);
      load = 1'b1;
      for (int c = 0; c < W; c++) begin
        #1;
        for (int b = 0; b < P; b++) begin
          int j, exp_h;
          j = 1020 - P * (c + 1) + b;
          exp_h = tb_h(ca, cb, cc, cr, j);
          checks++;
          if (int'(h[b]) != exp_h) begin
            failures++;
            if (failures < 10)
              $display("t=%0d c=%0d lane %0d: got %h expected %h", t, c, b, h[b], exp_h);
          end
        end
        @(negedge clk);
        load = 1'b0;
        ssf = ssf_t'({$urandom, $urandom});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * (W + 5) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
