// bch_error_locator: error locator (EL) with self-error detection.
//
// Each m-bit Chien search value H_b is reduced to one bit by an OR: h_b = 0
// means the determinant decision holds at that position. Whether such a zero
// marks an error depends on whether the codeword has any error at all: with
// no error every H is zero; with one to three errors at most three positions
// of the codeword give H = 0. The reference bit is therefore the OR of the
// first four h bits of the codeword (the comparator), captured once per
// codeword and held: ref = 1 when the codeword is in error. The error vector
// is e_b = h_b XOR ref, so a position is corrected only when its H is zero
// and the codeword is known to be in error.
//
// With P >= 4 the first four positions are the four highest-degree lanes of
// the first search cycle (lanes P-1 .. P-4), as in the 4-parallel design, and
// the reference is ready after one cycle. With P = 2 or 3 the comparator ORs
// all lanes of the first NREF = ceil(4/P) cycles (four or more positions,
// which works equally well, since at most three can be zero in a codeword in
// error); the h bits are then delayed NREF cycles so that the first ones meet
// the finished reference, which is double-buffered so that codewords can
// follow back to back. This extension to P < 4 is this design's own.
//
// Timing: h, load and active arrive in the same cycle; e and e_valid follow
// NREF cycles later (one cycle, the D flip-flops of the block diagram, for
// P >= 4). e is forced to zero when the search is not active. Holding the
// reference across the codeword (an enable on its flip-flop) is this
// design's reading of the block diagram.
module bch_error_locator
  import bch_pkg::*;
#(
  parameter int unsigned P = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         active,
  input  gf_t [P-1:0]  h,
  output logic [P-1:0] e,
  output logic         e_valid
);

  localparam int unsigned NREF = el_ref_cycles(P);
  localparam int unsigned NCMP = (P >= 4) ? 4 : P;   // lanes seen by the comparator

  logic [P-1:0] hbit;
  logic [P-1:0] hbit_q [NREF];
  logic         act_q  [NREF];
  logic         ref_q;
  logic         cmp;

  for (genvar b = 0; b < P; b++) begin : g_or
    assign hbit[b] = |h[b];
  end

  // Comparator: OR of the first positions of the codeword seen this cycle.
  assign cmp = |hbit[P-1 -: NCMP];

  // Delay line for the h bits and the active flag (NREF stages).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NREF; k++) begin
        hbit_q[k] <= '0;
        act_q[k]  <= 1'b0;
      end
    end else begin
      hbit_q[0] <= hbit;
      act_q[0]  <= active;
      for (int k = 1; k < NREF; k++) begin
        hbit_q[k] <= hbit_q[k-1];
        act_q[k]  <= act_q[k-1];
      end
    end
  end

  // Reference bit: taken on the load cycle, widened over the next NREF-1
  // cycles when P < 4, then held for the rest of the codeword.
  if (NREF == 1) begin : g_ref1
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    ref_q <= 1'b0;
      else if (load) ref_q <= cmp;
    end
  end else begin : g_refn
    // The comparator result is gathered in ref_acc and handed to ref_q only
    // when complete, because the previous codeword's last h bits are still
    // in the delay line and need the previous reference.
    localparam int unsigned RW = $clog2(NREF);
    logic [RW-1:0] win;    // comparator cycles still to come
    logic          ref_acc;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ref_q   <= 1'b0;
        ref_acc <= 1'b0;
        win     <= '0;
      end else if (load) begin
        ref_acc <= cmp;
        win     <= RW'(NREF - 1);
      end else if (win != '0) begin
        ref_acc <= ref_acc | cmp;
        win     <= win - 1'b1;
        if (win == RW'(1)) ref_q <= ref_acc | cmp;
      end
    end
  end

  assign e_valid = act_q[NREF-1];
  assign e       = e_valid ? (hbit_q[NREF-1] ^ {P{ref_q}}) : '0;

endmodule
