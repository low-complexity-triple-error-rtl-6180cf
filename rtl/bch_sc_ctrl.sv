// bch_sc_ctrl: framing controller of the syndrome calculators (controller #1).
//
// Counts the valid input words of a codeword (NWORDS = N/P words) and marks
// the first and the last word, which the syndrome calculators use to clear
// and to close their accumulators. All channels share one controller because
// their words arrive side by side on one input bus.
//
// Interface: in_valid qualifies the input word; first/last are combinational
// flags for the current word. Framing is implicit: after reset the first
// valid word starts a codeword and every NWORDS valid words form one. A
// codeword must arrive in consecutive cycles (checked by an assertion), gaps
// are allowed between codewords. The published architecture only names this controller;
// this framing is the design's own choice.
module bch_sc_ctrl #(
  parameter int unsigned NWORDS = 255
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic first,
  output logic last
);

  localparam int unsigned CW = $clog2(NWORDS);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (in_valid) cnt <= last ? '0 : cnt + 1'b1;
  end

  assign first = in_valid && (cnt == '0);
  assign last  = in_valid && (cnt == CW'(NWORDS - 1));

  // A codeword, once started, must not have gaps.
  a_no_gap: assert property (@(posedge clk) disable iff (!rst_n)
                             (cnt != '0) |-> in_valid)
    else $error("input gap inside a codeword");

endmodule
