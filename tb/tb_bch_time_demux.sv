// tb_bch_time_demux: checks the time demultiplexer with four channels.
//
// Factor sets tagged with channels 0..3 arrive one per cycle, in random
// order; the addressed channel must see the new set in the same cycle, and
// every channel must keep its last set while others are written.
module tb_bch_time_demux;
  import bch_pkg::*;

  localparam int CH = 4;

  logic clk = 1'b0;
  logic in_valid = 1'b0;
  logic [1:0] in_idx = '0;
  ssf_t ssf_in = '0;
  ssf_t [CH-1:0] ssf_out;

  always #2 clk = ~clk;

  bch_time_demux #(.CH(CH), .IDXW(2)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    ssf_t [CH-1:0] model;
    @(negedge clk);
    // write every channel once so the model is defined
    for (int k = 0; k < CH; k++) begin
      in_valid = 1'b1; in_idx = 2'(k);
      ssf_in = ssf_t'({$urandom, $urandom});
      model[k] = ssf_in;
      @(negedge clk);
    end
    for (int n = 0; n < 100; n++) begin
      in_valid = ($urandom_range(2, 0) != 0);
      in_idx = 2'($urandom);
      ssf_in = ssf_t'({$urandom, $urandom});
      if (in_valid) model[in_idx] = ssf_in;
      #1;
      for (int k = 0; k < CH; k++) begin
        checks++;
        if (ssf_out[k] !== model[k]) begin
          failures++;
          if (failures < 10) $display("n=%0d channel %0d mismatch", n, k);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
