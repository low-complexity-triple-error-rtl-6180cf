// bch_fifo: fixed-delay FIFO that holds the received words while their
// syndromes, factors and error vectors are computed.
//
// It is a circular buffer of DEPTH words with one pointer: every cycle the
// word at the pointer is read out and overwritten by the incoming word, so a
// word leaves exactly DEPTH cycles after it entered. A valid flag travels with
// each word. Until the buffer has been filled once after reset the output is
// forced to zero, so no stale contents appear as valid data.
//
// Interface: din/din_valid in, dout/dout_valid out, DEPTH cycles later. The
// published architecture gives only the role of the FIFO; the delay-line organisation is
// this design's choice (the decoder's pipeline never stalls, so a fixed delay
// is all that is needed).
module bch_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 272
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  input  logic             din_valid,
  output logic [WIDTH-1:0] dout,
  output logic             dout_valid
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH:0]  mem [DEPTH];
  logic [AW-1:0]   ptr;
  logic            primed;
  logic [WIDTH:0]  rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      primed <= 1'b0;
    end else if (ptr == AW'(DEPTH - 1)) begin
      ptr    <= '0;
      primed <= 1'b1;
    end else begin
      ptr    <= ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    mem[ptr] <= {din_valid, din};
  end

  assign rd         = primed ? mem[ptr] : '0;
  assign dout       = rd[WIDTH-1:0];
  assign dout_valid = rd[WIDTH];

endmodule
