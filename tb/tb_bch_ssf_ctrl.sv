// tb_bch_ssf_ctrl: checks the SSFC sequencer with four channels.
//
// After a syn_valid pulse, sel must step 0, 1, 2, 3 with sel_valid high for
// exactly four cycles. A one-cycle register stands in for the SSFC; cs_start
// must pulse once, four cycles after syn_valid, when channel 3's result
// returns.
module tb_bch_ssf_ctrl;

  localparam int CH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic syn_valid = 1'b0;
  logic [1:0] sel;
  logic sel_valid;
  logic ssf_valid = 1'b0;
  logic [1:0] ssf_idx = '0;
  logic cs_start;

  always #2 clk = ~clk;

  bch_ssf_ctrl #(.CH(CH), .IDXW(2)) dut (.*);

  // stand-in for the SSFC's one-cycle latency
  always @(posedge clk) begin
    ssf_valid <= sel_valid;
    ssf_idx   <= sel;
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int rnd = 0; rnd < 5; rnd++) begin
      for (int c = 0; c < 8 + rnd; c++) begin
        syn_valid = (c == 0);
        #1;
        checks++;
        if (c < CH) begin
          if (!sel_valid || sel != 2'(c)) begin
            failures++;
            $display("round %0d cycle %0d: sel_valid=%b sel=%0d", rnd, c, sel_valid, sel);
          end
        end else if (sel_valid) failures++;
        checks++;
        if (cs_start !== (c == CH)) begin
          failures++;
          $display("round %0d cycle %0d: cs_start=%b", rnd, c, cs_start);
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
