// bch_chien_search: p-parallel Chien search (CS) block of the m-SBS decoder.
//
// For every bit position j of the codeword it evaluates the determinant
// decision of the m-SBS algorithm
//     H_j = R + A alpha^j + B alpha^2j + C alpha^3j
// which is zero exactly when flipping bit j lowers the number of errors,
// i.e. when bit j is in error (for up to three errors).
//
// Case selection (input multiplexers of the CS block): if C = S1^3 + S3 is
// zero there is at most one error and the coefficients are A = S1^2, B = S1,
// C = 0, R = S1^3 + S3 (= 0); otherwise A, B, C, R are the shared factors.
//
// Structure: per power i = 1, 2, 3 a register holds X_i * alpha^(-i*P*c)
// for cycle c of the search. A multiplexer selects the freshly loaded
// coefficient on the load cycle and the register otherwise; its output feeds
// P constant multipliers (one per lane) and the feedback multiplier
// alpha^(-i*P). Lane b multiplies by alpha^(i*(NCODE-P+b)), so in cycle c
// lane b evaluates position j = NCODE - P*(c+1) + b: positions are visited
// from the highest degree down, in the order the bits arrive. The lane
// constants absorb the start position, so no pre-scaling of the loaded
// coefficients is needed. The lane and feedback constants are this design's
// choice; the published figure labels them only as alpha^(j,k).
// R is also captured on the load cycle (a choice of this design), so the
// inputs only need to be valid on that cycle.
//
// Timing: load is high for the first cycle of a search; h is combinational
// from the multiplexers and valid on that cycle and the NCODE/P-1 following
// ones. The block free-runs otherwise; its outputs are then meaningless.
module bch_chien_search
  import bch_pkg::*;
#(
  parameter int unsigned P     = 4,
  parameter int unsigned NCODE = N
) (
  input  logic            clk,
  input  logic            load,
  input  ssf_t            ssf,
  output gf_t [P-1:0]     h
);

  localparam int unsigned NPOW = T;     // powers alpha^j, alpha^2j, alpha^3j

  logic case1;
  gf_t  coef [NPOW];
  gf_t  r_sel, r_q, r_use;
  gf_t  q [NPOW];
  gf_t  mux_out [NPOW];

  // Case multiplexers (one error or fewer / two or more errors).
  assign case1   = (ssf.c == '0);
  assign coef[0] = case1 ? ssf.s1sq : ssf.a;
  assign coef[1] = case1 ? ssf.s1   : ssf.b;
  assign coef[2] = case1 ? gf_t'(0) : ssf.c;
  assign r_sel   = case1 ? ssf.c    : ssf.r;

  always_ff @(posedge clk) begin
    if (load) r_q <= r_sel;
  end
  assign r_use = load ? r_sel : r_q;

  gf_t terms [NPOW][P];

  for (genvar i = 0; i < NPOW; i++) begin : g_pow
    localparam int unsigned IP = i + 1;
    localparam gf_t FB = gf_alpha_pow(-int'(IP * P));

    assign mux_out[i] = load ? coef[i] : q[i];

    always_ff @(posedge clk) begin
      q[i] <= gf_mul(mux_out[i], FB);
    end

    for (genvar b = 0; b < P; b++) begin : g_lane
      localparam gf_t LC = gf_alpha_pow(int'(IP * (NCODE - P + b)));
      assign terms[i][b] = gf_mul(mux_out[i], LC);
    end
  end

  for (genvar b = 0; b < P; b++) begin : g_h
    assign h[b] = r_use ^ terms[0][b] ^ terms[1][b] ^ terms[2][b];
  end

endmodule
