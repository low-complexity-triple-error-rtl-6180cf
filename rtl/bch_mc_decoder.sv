// bch_mc_decoder: multi-channel, p-parallel, triple-error-correcting BCH
// decoder using modified step-by-step (m-SBS) decoding.
//
// CH independent channels each receive a (1020, 990) BCH codeword, P bits
// per clock, side by side on one CH*P-bit bus (channel k on bits
// [k*P +: P], within a channel the highest-degree bit first, see
// bch_syndrome_calc). Per channel a syndrome calculator computes S1, S3, S5.
// Since the syndromes of a codeword are ready only once per N/P cycles, a
// single sharing syndrome factor calculator (SSFC) serves all channels
// through a time multiplexer and demultiplexer. Each channel then runs its
// own Chien search, which tests the m-SBS determinant decision at P bit
// positions per clock, and its error locator, whose error bits are XORed onto
// the received bits delayed by the FIFO. With CH = 1 the same RTL is the
// single-channel decoder of the published single-channel block diagram.
//
// Timing, with W = N/P words per codeword (255):
//   word 0 of a codeword enters in cycle t0, the last in t0+W-1;
//   syndromes valid in t0+W (all channels);
//   channel k's factors leave the SSFC in t0+W+1+k;
//   all Chien searches load in t0+W+CH and run W cycles;
//   error bits are registered NREF cycles later (NREF = 1 for P >= 4,
//   ceil(4/P) for P = 2, 3) and the corrected word leaves the output
//   register in t0+W+CH+NREF+1.
// The latency is W+CH+NREF+1 cycles: 258 for CH = 1 and P = 4 (the figure
// published for the 4-parallel single-channel decoder) and 273 for CH = 16.
// The published 16-channel figure is 267; the scheduling of the shared SSFC
// that achieves it is not described, so this design starts all channels'
// searches together. P must divide NCODE.
// Throughput is one CH*P-bit word per clock with codewords back to back.
// Codewords must arrive without gaps inside a codeword; gaps between
// codewords are allowed. No stall or back-pressure exists.
module bch_mc_decoder
  import bch_pkg::*;
#(
  parameter int unsigned CH    = 16,
  parameter int unsigned P     = 4,
  parameter int unsigned NCODE = N
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [CH*P-1:0]   in_data,
  output logic              out_valid,
  output logic [CH*P-1:0]   out_data
);

  localparam int unsigned NWORDS = NCODE / P;
  localparam int unsigned IDXW   = (CH > 1) ? $clog2(CH) : 1;
  localparam int unsigned NREF   = el_ref_cycles(P);   // error locator delay
  localparam int unsigned DELAY  = NWORDS + CH + NREF; // FIFO delay in cycles

  if (NWORDS * P != NCODE) begin : g_check
    $error("code length must be a multiple of the parallel factor");
  end

  // ---------------- controller #1 and syndrome calculators ----------------
  logic first, last;

  bch_sc_ctrl #(.NWORDS(NWORDS)) u_ctrl1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .first    (first),
    .last     (last)
  );

  syn_t [CH-1:0] syn;
  logic [CH-1:0] syn_valid;

  for (genvar k = 0; k < CH; k++) begin : g_sc
    bch_syndrome_calc #(.P(P)) u_sc (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .in_first  (first),
      .in_last   (last),
      .data      (in_data[k*P +: P]),
      .syn       (syn[k]),
      .syn_valid (syn_valid[k])
    );
  end

  // ---------------- controller #2, time mux, shared SSFC, time demux ----------------
  logic [IDXW-1:0] sel, ssf_idx;
  logic            sel_valid, ssf_valid, cs_start;
  syn_t            syn_sel;
  ssf_t            ssf;
  ssf_t [CH-1:0]   ssf_ch;

  bch_ssf_ctrl #(.CH(CH), .IDXW(IDXW)) u_ctrl2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .syn_valid (syn_valid[0]),
    .sel       (sel),
    .sel_valid (sel_valid),
    .ssf_valid (ssf_valid),
    .ssf_idx   (ssf_idx),
    .cs_start  (cs_start)
  );

  bch_time_mux #(.CH(CH), .IDXW(IDXW)) u_tmux (
    .clk     (clk),
    .capture (syn_valid[0]),
    .syn_in  (syn),
    .sel     (sel),
    .syn_out (syn_sel)
  );

  bch_ssfc #(.IDXW(IDXW)) u_ssfc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sel_valid),
    .in_idx    (sel),
    .syn       (syn_sel),
    .out_valid (ssf_valid),
    .out_idx   (ssf_idx),
    .ssf       (ssf)
  );

  bch_time_demux #(.CH(CH), .IDXW(IDXW)) u_tdemux (
    .clk      (clk),
    .in_valid (ssf_valid),
    .in_idx   (ssf_idx),
    .ssf_in   (ssf),
    .ssf_out  (ssf_ch)
  );

  // ---------------- controller #3, Chien search + error locators ----------------
  logic cs_load, cs_active;

  bch_cs_ctrl #(.NWORDS(NWORDS)) u_ctrl3 (
    .clk      (clk),
    .rst_n    (rst_n),
    .cs_start (cs_start),
    .load     (cs_load),
    .active   (cs_active)
  );

  logic [CH*P-1:0] e_all;
  logic [CH-1:0]   e_valid;

  for (genvar k = 0; k < CH; k++) begin : g_csel
    bch_cs_el #(.P(P), .NCODE(NCODE)) u_csel (
      .clk     (clk),
      .rst_n   (rst_n),
      .load    (cs_load),
      .active  (cs_active),
      .ssf     (ssf_ch[k]),
      .e       (e_all[k*P +: P]),
      .e_valid (e_valid[k])
    );
  end

  // ---------------- FIFO and correction ----------------
  logic [CH*P-1:0] fifo_data;
  logic            fifo_valid;

  bch_fifo #(.WIDTH(CH*P), .DEPTH(DELAY)) u_fifo (
    .clk        (clk),
    .rst_n      (rst_n),
    .din        (in_data),
    .din_valid  (in_valid),
    .dout       (fifo_data),
    .dout_valid (fifo_valid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= fifo_valid;
      out_data  <= fifo_data ^ e_all;
    end
  end

  // The error bits must line up with the delayed received words.
  a_align: assert property (@(posedge clk) disable iff (!rst_n)
                            (|e_valid) |-> fifo_valid)
    else $error("error vector without matching FIFO word");

  // All channels share the framing, so they finish their syndromes together.
  a_syn_together: assert property (@(posedge clk) disable iff (!rst_n)
                                   (|syn_valid) |-> (&syn_valid))
    else $error("channels out of step");

endmodule
