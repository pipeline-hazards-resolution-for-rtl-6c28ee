// imem: instruction memory (Harvard organisation, separate from data).
//
// DEPTH 32-bit words, word addressed by byte address bits [AW+1:2]; higher
// address bits are ignored, so the program image repeats through the
// address space (the default reset address 0x4000 maps to word 0).
// The fetch port is read combinationally in the IF stage. A write port,
// active on the rising clock edge, loads the program. Contents are not
// reset. That instructions and data have independent memories follows the
// design description; the size, the asynchronous read and the loading port
// are this design's choices.
module imem #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic           clk,
  input  rpp_pkg::word_t addr,
  output rpp_pkg::word_t rdata,
  input  logic           we,
  input  rpp_pkg::word_t waddr,
  input  rpp_pkg::word_t wdata
);
  import rpp_pkg::*;
  localparam int AW = $clog2(DEPTH);
  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule
