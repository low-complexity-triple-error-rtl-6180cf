// bch_ssfc: sharing syndrome factor calculator (SSFC).
//
// Computes, once per codeword, the constant terms of the m-SBS determinant
// decision R = A alpha^j + B alpha^2j + C alpha^3j:
//   C = S1^3 + S3
//   B = S1^4 + S1 S3
//   A = S5 + S1^2 S3
//   R = S1^6 + S3^2 + S1^3 S3 + S1 S5 = (S1^3 + S3)^2 + S1^3 S3 + S1 S5
// with four variable multipliers (S1*S3, S1^2*S3, S1^3*S3, S1*S5), one
// (.)^3 operator and squarers, as in the published factor network. S1 and
// S1^2 are passed on for the single-error case of the Chien search.
//
// Because the factors do not depend on the bit position, one SSFC serves all
// parallel lanes and, through the time multiplexer, all channels.
//
// Timing: one clock of latency. A set of syndromes presented with in_valid is
// registered together with its channel tag in_idx; out_valid/out_idx mark the
// result one cycle later. The result register holds its value otherwise.
module bch_ssfc
  import bch_pkg::*;
#(
  parameter int unsigned IDXW = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [IDXW-1:0] in_idx,
  input  syn_t            syn,
  output logic            out_valid,
  output logic [IDXW-1:0] out_idx,
  output ssf_t            ssf
);

  gf_t s1sq, s1p4, s1cube, s1s3, s1sqs3, s1cubes3, s1s5;
  ssf_t f;

  always_comb begin
    s1sq     = gf_sq(syn.s1);
    s1p4     = gf_sq(s1sq);
    s1cube   = gf_cube(syn.s1);
    s1s3     = gf_mul(syn.s1, syn.s3);
    s1sqs3   = gf_mul(s1sq, syn.s3);
    s1cubes3 = gf_mul(s1cube, syn.s3);
    s1s5     = gf_mul(syn.s1, syn.s5);

    f.s1   = syn.s1;
    f.s1sq = s1sq;
    f.c    = s1cube ^ syn.s3;
    f.b    = s1p4 ^ s1s3;
    f.a    = syn.s5 ^ s1sqs3;
    f.r    = gf_sq(f.c) ^ s1cubes3 ^ s1s5;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      ssf       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx <= in_idx;
        ssf     <= f;
      end
    end
  end

endmodule
