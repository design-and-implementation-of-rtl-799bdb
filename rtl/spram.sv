// spram: single-port synchronous SRAM model (one read or write per cycle).
//
// What it does: the on-chip memories of the decoder - the de-blocking
// content memory (unfiltered pixels of the current macroblock) and the slice
// memories (neighbouring pixels of the previous macroblock row) - are all
// single-port SRAMs of 32-bit words, i.e. four pixels per word.
//
// How it works: a plain array. With `en` high, `we` high writes `wdata` at
// `addr`; `we` low reads, and `rdata` holds the word one cycle later. With
// `en` low the memory does nothing and `rdata` keeps its value (the memory
// is switched off in the low-power mode).
//
// Document vs. own choice: the default size is the document's content
// memory, (16 + 8) * 4 words of 32 bits for a 4:2:0 macroblock. The
// one-cycle read latency is this design's choice (a typical SRAM macro).
module spram #(
  parameter int unsigned DEPTH = (16 + 8) * 4,   // words
  parameter int unsigned WIDTH = 32              // bits per word
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
