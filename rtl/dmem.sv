// dmem: data memory (Harvard organisation, separate from instructions).
//
// DEPTH 32-bit words, word addressed by byte address bits [AW+1:2]; higher
// address bits are ignored. Accessed by the MEM stage: a load reads
// combinationally in the same cycle, a store writes on the rising clock
// edge. A second, read-only port lets the memory be inspected and a write
// port on the same clock lets it be preloaded (it has priority over the
// store port only when the processor is idle, which the user ensures).
// Contents are not reset. The separate data interface follows the design
// description; size, timing and the extra ports are this design's choices.
module dmem #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic           clk,
  input  rpp_pkg::word_t addr,
  output rpp_pkg::word_t rdata,
  input  logic           we,
  input  rpp_pkg::word_t wdata,
  // preload and inspection
  input  logic           ext_we,
  input  rpp_pkg::word_t ext_addr,
  input  rpp_pkg::word_t ext_wdata,
  output rpp_pkg::word_t ext_rdata
);
  import rpp_pkg::*;
  localparam int AW = $clog2(DEPTH);
  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ext_we)  mem[ext_addr[AW+1:2]] <= ext_wdata;
    else if (we) mem[addr[AW+1:2]]     <= wdata;
  end

  assign rdata     = mem[addr[AW+1:2]];
  assign ext_rdata = mem[ext_addr[AW+1:2]];
endmodule
