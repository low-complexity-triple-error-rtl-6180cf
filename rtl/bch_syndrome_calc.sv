// bch_syndrome_calc: p-parallel syndrome calculator for S1, S3 and S5.
//
// Each syndrome S_i = r(alpha^i) is evaluated by Horner's rule, p received
// bits per clock (Fig. 2 structure): the p bits of the word are weighted by
// alpha^(i*b) with constant multipliers and summed, the accumulator is scaled
// by alpha^(i*p) and added. At the first word of a codeword the feedback
// multiplexer selects 0, so codewords may follow back to back. The even
// syndromes are not computed (S_2i = S_i^2).
//
// Bit order: a codeword of N bits is sent highest degree first, N/P words.
// In word w (w = 0 .. N/P-1) bit data[b] is the coefficient r_j with
// j = N - P*(w+1) + b, i.e. data[P-1] is the highest-degree bit of the word.
//
// Timing: in_first marks the first word, in_last the last word of a codeword
// (from the framing controller). syn_valid is high for one cycle, the cycle
// after the last word; syn then holds the three syndromes. Outside that
// cycle the output multiplexer drives zeros (Fig. 2 output multiplexer).
// The three accumulators are this design's D flip-flops; they need no reset
// because the first word of every codeword clears them.
module bch_syndrome_calc
  import bch_pkg::*;
#(
  parameter int unsigned P = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         in_last,
  input  logic [P-1:0] data,
  output syn_t         syn,
  output logic         syn_valid
);

  localparam int unsigned NSYN = T;     // S1, S3, S5

  gf_t acc [NSYN];

  for (genvar s = 0; s < NSYN; s++) begin : g_syn
    localparam int unsigned I = 2 * s + 1;
    localparam gf_t STEP = gf_alpha_pow(int'(I * P));

    gf_t weights [P];
    for (genvar b = 0; b < P; b++) begin : g_w
      assign weights[b] = gf_alpha_pow(int'(I * b));
    end

    gf_t word_sum;
    always_comb begin
      word_sum = '0;
      for (int b = 0; b < P; b++)
        if (data[b]) word_sum = word_sum ^ weights[b];
    end

    gf_t fb;
    assign fb = in_first ? gf_t'(0) : gf_mul(acc[s], STEP);

    always_ff @(posedge clk) begin
      if (in_valid) acc[s] <= fb ^ word_sum;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) syn_valid <= 1'b0;
    else        syn_valid <= in_valid & in_last;
  end

  assign syn.s1 = syn_valid ? acc[0] : gf_t'(0);
  assign syn.s3 = syn_valid ? acc[1] : gf_t'(0);
  assign syn.s5 = syn_valid ? acc[2] : gf_t'(0);

endmodule
