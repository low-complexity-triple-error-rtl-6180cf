// bch_ssf_ctrl: controller #2, sequences the shared SSFC over the channels.
//
// When the syndrome calculators finish (syn_valid, all channels in the same
// cycle), it steps the time multiplexer through channels 0 .. CH-1, one per
// clock, starting in that same cycle. The SSFC result of the last channel
// appears one cycle after it was selected; that cycle is the common start of
// the Chien searches of all channels (cs_start), when channel CH-1 takes its
// factors straight from the SSFC and the others from the demultiplexer's
// registers.
//
// Interface: sel/sel_valid drive the time multiplexer and the SSFC input;
// ssf_valid/ssf_idx come back from the SSFC output; cs_start is a one-cycle
// pulse. Timing: cs_start comes CH cycles after syn_valid. This sequencing is
// the design's own; the published architecture only names the controller.
module bch_ssf_ctrl #(
  parameter int unsigned CH   = 16,
  parameter int unsigned IDXW = (CH > 1) ? $clog2(CH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            syn_valid,
  output logic [IDXW-1:0] sel,
  output logic            sel_valid,
  input  logic            ssf_valid,
  input  logic [IDXW-1:0] ssf_idx,
  output logic            cs_start
);

  logic            busy;
  logic [IDXW-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
    end else if (syn_valid) begin
      busy <= (CH > 1);
      idx  <= IDXW'(1);
    end else if (busy) begin
      if (idx == IDXW'(CH - 1)) busy <= 1'b0;
      idx <= idx + 1'b1;
    end
  end

  assign sel       = syn_valid ? '0 : idx;
  assign sel_valid = syn_valid | busy;
  assign cs_start  = ssf_valid && (ssf_idx == IDXW'(CH - 1));

  // A new set of syndromes must not arrive while channels are still queued.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 syn_valid |-> !busy)
    else $error("syndromes arrived while the SSFC was still busy");

endmodule
