// bch_time_demux: time demultiplexer between the shared SSFC and the
// channels' Chien search blocks.
//
// The SSFC delivers one channel's factors per cycle, tagged with the channel
// number. The demultiplexer stores them in that channel's register and, in
// the same cycle, forwards them directly to that channel; the other channels
// see their stored factors. When the last channel's factors arrive, every
// channel therefore sees its own factors in the same cycle, and all Chien
// searches can start together.
//
// Interface: in_valid/in_idx/ssf_in from the SSFC; ssf_out[k] to channel k,
// combinational. The published architecture names the block; the organisation is this
// design's choice.
module bch_time_demux
  import bch_pkg::*;
#(
  parameter int unsigned CH   = 16,
  parameter int unsigned IDXW = (CH > 1) ? $clog2(CH) : 1
) (
  input  logic            clk,
  input  logic            in_valid,
  input  logic [IDXW-1:0] in_idx,
  input  ssf_t            ssf_in,
  output ssf_t [CH-1:0]   ssf_out
);

  ssf_t hold [CH];

  for (genvar k = 0; k < CH; k++) begin : g_ch
    logic hit;
    assign hit = in_valid && (in_idx == IDXW'(k));

    always_ff @(posedge clk) begin
      if (hit) hold[k] <= ssf_in;
    end

    assign ssf_out[k] = hit ? ssf_in : hold[k];
  end

endmodule
