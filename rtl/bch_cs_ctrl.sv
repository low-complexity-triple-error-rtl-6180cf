// bch_cs_ctrl: controller #3, runs the Chien searches and error locators.
//
// On cs_start it issues the load pulse that makes every channel's Chien
// search take its factors and the error locators take their reference bit,
// then keeps the search active for the NWORDS cycles of one codeword.
//
// Interface: cs_start in; load (same cycle as cs_start) and active (NWORDS
// cycles from cs_start) out. The published architecture only names this controller; the
// counter is the design's own.
module bch_cs_ctrl #(
  parameter int unsigned NWORDS = 255
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cs_start,
  output logic load,
  output logic active
);

  localparam int unsigned CW = $clog2(NWORDS + 1);

  logic [CW-1:0] left;   // cycles of the search still to run after this one

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          left <= '0;
    else if (cs_start)   left <= CW'(NWORDS - 1);
    else if (left != '0) left <= left - 1'b1;
  end

  assign load   = cs_start;
  assign active = cs_start || (left != '0);

endmodule
