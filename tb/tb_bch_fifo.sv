// tb_bch_fifo: checks the fixed-delay FIFO.
//
// Random words with a random valid flag are pushed every cycle; each must
// come out exactly DEPTH cycles later with its flag, and nothing may come out
// valid before the buffer has been filled once after reset.
module tb_bch_fifo;

  localparam int WIDTH = 12;
  localparam int DEPTH = 9;
  localparam int NCYC  = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [WIDTH-1:0] din = '0;
  logic din_valid = 1'b0;
  logic [WIDTH-1:0] dout;
  logic dout_valid;

  always #2 clk = ~clk;

  bch_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH:0] hist [NCYC];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      din = WIDTH'($urandom);
      din_valid = ($urandom_range(3, 0) != 0);
      hist[c] = {din_valid, din};
      #1;
      checks++;
      if (c < DEPTH) begin
        if (dout_valid) failures++;
      end else if ({dout_valid, dout} !== hist[c - DEPTH]) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: got %b/%h expected %b/%h", c, dout_valid, dout,
                   hist[c - DEPTH][WIDTH], hist[c - DEPTH][WIDTH-1:0]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
