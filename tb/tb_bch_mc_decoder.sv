// tb_bch_mc_decoder: end-to-end test of the 16-channel 4-parallel (1020, 990)
// decoder at its default parameters.
//
// Every channel receives a stream of 24 random codewords (systematically
// encoded by the reference model) with 0, 1, 2 or 3 bit errors injected; the
// decoded output must equal the transmitted codeword bit for bit, and the
// first word of each codeword must leave the decoder W + CH + 2 = 273 cycles
// after it entered. Codewords are sent both back to back and with idle gaps.
// The test counts how often each decoding situation occurred (no error, the
// single-error case, two and three errors, errors in the first word that the
// self-error detection inspects, errors in the last word, back-to-back and
// gapped codewords) and fails if one never occurred.
module tb_bch_mc_decoder;
  import bch_pkg::*;
  import bch_tb_pkg::*;

  localparam int CH  = 16;
  localparam int P   = 4;
  localparam int W   = 1020 / 4;
  localparam int LAT = 273;
  localparam int NCW = 24;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            in_valid = 1'b0;
  logic [CH*P-1:0] in_data = '0;
  logic            out_valid;
  logic [CH*P-1:0] out_data;

  always #1 clk = ~clk;

  bch_mc_decoder dut (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_data   (in_data),
    .out_valid (out_valid),
    .out_data  (out_data)
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  cw_t sent [NCW][CH];
  cw_t recv [NCW][CH];
  int  start_cyc [NCW];
  int  n_noerr = 0, n_single = 0, n_double = 0, n_triple = 0;
  int  n_first_word = 0, n_last_word = 0, n_b2b = 0, n_gap = 0;
  int  in_idx = 0, in_cw = 0, out_idx = 0, out_cw = 0;
  bit  done = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Build the codewords and error patterns.
  initial begin
    tb_init();
    for (int c = 0; c < NCW; c++) begin
      for (int k = 0; k < CH; k++) begin
        cw_t e;
        int  nerr;
        nerr = (c + k) % 4;
        sent[c][k] = tb_random_codeword();
        e = tb_error_pattern(nerr);
        if (nerr > 0 && ((c * CH + k) % 5) == 0) begin
          e = tb_error_pattern(nerr - 1);
          while (e[TN - 1 - (c % 4)]) e = tb_error_pattern(nerr - 1);
          e[TN - 1 - (c % 4)] = 1'b1;
        end
        if (nerr > 0 && ((c * CH + k) % 5) == 1) begin
          e = tb_error_pattern(nerr - 1);
          while (e[c % 4]) e = tb_error_pattern(nerr - 1);
          e[c % 4] = 1'b1;
        end
        recv[c][k] = sent[c][k] ^ e;
        case (nerr)
          0: n_noerr++;
          1: n_single++;
          2: n_double++;
          default: n_triple++;
        endcase
        if (|e[TN-1 -: 4]) n_first_word++;
        if (|e[3:0])       n_last_word++;
      end
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int c = 0; c < NCW; c++) begin
      if (c > 0) begin
        if (c % 3 == 2) begin
          int gap;
          gap = int'($urandom_range(40, 1));
          in_valid = 1'b0;
          repeat (gap) @(negedge clk);
          n_gap++;
        end else begin
          n_b2b++;
        end
      end
      for (int w = 0; w < W; w++) begin
        in_valid = 1'b1;
        for (int k = 0; k < CH; k++)
          in_data[k*P +: P] = recv[c][k][TN - P*(w+1) +: P];
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    in_data  = '0;
  end

  // Record when each codeword's first word enters.
  always @(posedge clk) begin
    if (in_valid) begin
      if (in_idx == 0) start_cyc[in_cw] <= cyc;
      if (in_idx == W - 1) begin in_idx <= 0; in_cw <= in_cw + 1; end
      else in_idx <= in_idx + 1;
    end
  end

  // Check the decoded words and the latency.
  always @(posedge clk) begin
    if (rst_n && out_valid && !done) begin
      logic [CH*P-1:0] exp_word;
      for (int k = 0; k < CH; k++)
        exp_word[k*P +: P] = sent[out_cw][k][TN - P*(out_idx+1) +: P];
      checks++;
      if (out_data !== exp_word) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH cw %0d word %0d: got %h expected %h", out_cw, out_idx,
                   out_data, exp_word);
      end
      if (out_idx == 0) begin
        checks++;
        if (cyc - start_cyc[out_cw] != LAT) begin
          failures++;
          $display("LATENCY cw %0d: %0d cycles, expected %0d", out_cw,
                   cyc - start_cyc[out_cw], LAT);
        end
      end
      if (out_idx == W - 1) begin
        out_idx <= 0;
        out_cw  <= out_cw + 1;
        if (out_cw == NCW - 1) done = 1;
      end else begin
        out_idx <= out_idx + 1;
      end
    end
  end

  task automatic report_counts();
    $display("codewords: no error %0d, one error %0d, two %0d, three %0d",
             n_noerr, n_single, n_double, n_triple);
    $display("first-word errors %0d, last-word errors %0d, back-to-back %0d, gaps %0d",
             n_first_word, n_last_word, n_b2b, n_gap);
    checks++; if (n_noerr == 0)      failures++;
    checks++; if (n_single == 0)     failures++;
    checks++; if (n_double == 0)     failures++;
    checks++; if (n_triple == 0)     failures++;
    checks++; if (n_first_word == 0) failures++;
    checks++; if (n_last_word == 0)  failures++;
    checks++; if (n_b2b == 0)        failures++;
    checks++; if (n_gap == 0)        failures++;
  endtask

  initial begin
    wait (done);
    repeat (2) @(posedge clk);
    report_counts();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCW * (W + 50) + 1000) @(posedge clk);
    $display("watchdog: decoder produced %0d of %0d codewords", out_cw, NCW);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
