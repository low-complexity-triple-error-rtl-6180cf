// bch_time_mux: time multiplexer between the channels' syndrome calculators
// and the single shared SSFC.
//
// All channels finish their syndromes in the same cycle (capture). In that
// cycle channel 0 is passed straight through while every channel's syndromes
// are copied into a holding register; in the following cycles the channel
// named by sel is read from the holding registers. One set of syndromes per
// clock thus reaches the SSFC, CH sets in CH cycles.
//
// Interface: syn_in[k] are channel k's syndromes (valid in the capture
// cycle), sel the channel to forward, syn_out the selected syndromes. Purely
// combinational from syn_in in the capture cycle, from registers otherwise.
// The published architecture names the block; the hold-and-select organisation is this
// design's choice.
module bch_time_mux
  import bch_pkg::*;
#(
  parameter int unsigned CH   = 16,
  parameter int unsigned IDXW = (CH > 1) ? $clog2(CH) : 1
) (
  input  logic            clk,
  input  logic            capture,
  input  syn_t [CH-1:0]   syn_in,
  input  logic [IDXW-1:0] sel,
  output syn_t            syn_out
);

  syn_t hold [CH];

  always_ff @(posedge clk) begin
    if (capture)
      for (int k = 0; k < CH; k++) hold[k] <= syn_in[k];
  end

  always_comb begin
    syn_out = '0;
    for (int k = 0; k < CH; k++)
      if (sel == IDXW'(k)) syn_out = capture ? syn_in[k] : hold[k];
  end

endmodule
