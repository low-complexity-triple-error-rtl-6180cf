// tb_bch_cs_ctrl: checks the Chien search controller with 5-word codewords.
//
// A cs_start pulse must give load in the same cycle and active for exactly
// five cycles from it; starts follow each other back to back and with gaps.
module tb_bch_cs_ctrl;

  localparam int NW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cs_start = 1'b0;
  logic load, active;

  always #2 clk = ~clk;

  bch_cs_ctrl #(.NWORDS(NW)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rnd = 0; rnd < 6; rnd++) begin
      int len;
      len = NW + (rnd % 2) * 3;       // odd rounds leave a 3-cycle gap
      for (int c = 0; c < len; c++) begin
        cs_start = (c == 0);
        #1;
        checks++;
        if (load !== (c == 0) || active !== (c < NW)) begin
          failures++;
          $display("round %0d cycle %0d: load=%b active=%b", rnd, c, load, active);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
