// tb_bch_time_mux: checks the time multiplexer with four channels.
//
// In the capture cycle the selected channel 0 must pass straight through;
// afterwards, with the inputs changed to other values, each channel named by
// sel must be read from the values captured earlier.
module tb_bch_time_mux;
  import bch_pkg::*;

  localparam int CH = 4;

  logic clk = 1'b0;
  logic capture = 1'b0;
  syn_t [CH-1:0] syn_in = '0;
  logic [1:0] sel = '0;
  syn_t syn_out;

  always #2 clk = ~clk;

  bch_time_mux #(.CH(CH), .IDXW(2)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    syn_t [CH-1:0] snap;
    for (int rnd = 0; rnd < 10; rnd++) begin
      @(negedge clk);
      for (int k = 0; k < CH; k++) syn_in[k] = syn_t'({$urandom, $urandom});
      snap = syn_in;
      capture = 1'b1;
      sel = '0;
      #1;
      checks++;
      if (syn_out !== snap[0]) failures++;
      @(negedge clk);
      capture = 1'b0;
      for (int k = 0; k < CH; k++) syn_in[k] = syn_t'({$urandom, $urandom});
      for (int k = CH - 1; k >= 0; k--) begin
        sel = 2'(k);
        #1;
        checks++;
        if (syn_out !== snap[k]) begin
          failures++;
          $display("round %0d channel %0d: got %h expected %h", rnd, k, syn_out, snap[k]);
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
