// tb_bch_sc_ctrl: checks the framing controller with 5-word codewords.
//
// Codewords are sent back to back and with idle gaps; first must mark word 0
// and last word 4 of every codeword, and neither may be high on idle cycles.
module tb_bch_sc_ctrl;

  localparam int NW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic first, last;

  always #2 clk = ~clk;

  bch_sc_ctrl #(.NWORDS(NW)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 12; c++) begin
      for (int w = 0; w < NW; w++) begin
        in_valid = 1'b1;
        #1;
        checks++;
        if (first !== (w == 0) || last !== (w == NW - 1)) begin
          failures++;
          $display("codeword %0d word %0d: first=%b last=%b", c, w, first, last);
        end
        @(negedge clk);
      end
      if (c % 3 == 0) begin
        in_valid = 1'b0;
        repeat (c % 4 + 1) begin
          #1;
          checks++;
          if (first || last) failures++;
          @(negedge clk);
        end
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
