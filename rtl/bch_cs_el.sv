// bch_cs_el: one channel's "Chien search + error locator".
//
// Chains the p-parallel Chien search, which evaluates the m-SBS determinant
// decision for P bit positions per cycle, and the error locator with
// self-error detection, which turns the P m-bit results into P error bits.
// In the multi-channel decoder there is one instance per channel; the shared
// factor calculator feeds them all through the time demultiplexer.
//
// Timing: ssf must be valid in the load cycle. e[b] is the error bit of lane
// b and appears one cycle after the Chien search evaluated it (ceil(4/P)
// cycles for P < 4), with e_valid. Lane b of search cycle c is bit position
// NCODE - P*(c+1) + b.
module bch_cs_el
  import bch_pkg::*;
#(
  parameter int unsigned P     = 4,
  parameter int unsigned NCODE = N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         active,
  input  ssf_t         ssf,
  output logic [P-1:0] e,
  output logic         e_valid
);

  gf_t [P-1:0] h;

  bch_chien_search #(.P(P), .NCODE(NCODE)) u_cs (
    .clk  (clk),
    .load (load),
    .ssf  (ssf),
    .h    (h)
  );

  bch_error_locator #(.P(P)) u_el (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (load),
    .active  (active),
    .h       (h),
    .e       (e),
    .e_valid (e_valid)
  );

endmodule
