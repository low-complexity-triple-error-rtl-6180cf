// bch_pf_check: drives one decoder instance with parallel factor P and CH
// channels and checks it (helper of tb_bch_parallel_factors).
//
// NC is the length the decoder is built for. When P does not divide 1020 it
// is the next multiple of P (at most 1023): the 1020-bit codewords are then
// sent with NC - 1020 leading zeros, which keeps them codewords of the same
// shortened BCH code, and those zeros must come out unchanged.
//
// NCW random codewords per channel with 0..3 injected errors are sent, the
// first half back to back, then one idle gap, then the rest. Every output
// word must equal the transmitted codeword and word 0 of each codeword must
// appear W + CH + NREF + 1 cycles after it entered, NREF = ceil(4/P) for
// P < 4 and 1 otherwise. Results are reported through the output ports.
module bch_pf_check
  import bch_tb_pkg::*;
#(
  parameter int P   = 4,
  parameter int CH  = 2,
  parameter int NCW = 8,
  parameter int NC  = TN
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_err [4]
);

  localparam int W    = NC / P;
  localparam int NREF = (P >= 4) ? 1 : (4 + P - 1) / P;
  localparam int LAT  = W + CH + NREF + 1;

  logic            in_valid = 1'b0;
  logic [CH*P-1:0] in_data  = '0;
  logic            out_valid;
  logic [CH*P-1:0] out_data;

  bch_mc_decoder #(.CH(CH), .P(P), .NCODE(NC)) dut (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_data   (in_data),
    .out_valid (out_valid),
    .out_data  (out_data)
  );

  logic [1022:0] sent [NCW][CH];   // zero-extended to the decoder length
  logic [1022:0] recv [NCW][CH];
  int  start_cyc [NCW];
  int  cyc = 0, in_idx = 0, in_cw = 0, out_idx = 0, out_cw = 0;

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    for (int k = 0; k < 4; k++) n_err[k] = 0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    wait (rst_n);
    for (int c = 0; c < NCW; c++)
      for (int k = 0; k < CH; k++) begin
        int nerr;
        nerr = (c + 3 * k) % 4;
        sent[c][k] = 1023'(tb_random_codeword());
        recv[c][k] = sent[c][k] ^ 1023'(tb_error_pattern(nerr));
        n_err[nerr]++;
      end
    @(negedge clk);
    for (int c = 0; c < NCW; c++) begin
      if (c == NCW / 2) begin
        in_valid = 1'b0;
        repeat (7) @(negedge clk);
      end
      for (int w = 0; w < W; w++) begin
        in_valid = 1'b1;
        for (int k = 0; k < CH; k++)
          in_data[k*P +: P] = recv[c][k][NC - P*(w+1) +: P];
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
  end

  always @(posedge clk) begin
    if (in_valid) begin
      if (in_idx == 0) start_cyc[in_cw] <= cyc;
      if (in_idx == W - 1) begin in_idx <= 0; in_cw <= in_cw + 1; end
      else in_idx <= in_idx + 1;
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && !done) begin
      logic [CH*P-1:0] exp_word;
      for (int k = 0; k < CH; k++)
        exp_word[k*P +: P] = sent[out_cw][k][NC - P*(out_idx+1) +: P];
      checks++;
      if (out_data !== exp_word) begin
        failures++;
        if (failures < 5) $display("P=%0d cw %0d word %0d mismatch", P, out_cw, out_idx);
      end
      if (out_idx == 0) begin
        checks++;
        if (cyc - start_cyc[out_cw] != LAT) begin
          failures++;
          $display("P=%0d cw %0d: latency %0d, expected %0d", P, out_cw,
                   cyc - start_cyc[out_cw], LAT);
        end
      end
      if (out_idx == W - 1) begin
        out_idx <= 0;
        out_cw  <= out_cw + 1;
        if (out_cw == NCW - 1) done = 1'b1;
      end else begin
        out_idx <= out_idx + 1;
      end
    end
  end

endmodule
