// regfile: register bank of the processor.
//
// 32 general-purpose 32-bit registers with two combinational read ports,
// used by the instruction in the ID stage, and one write port, used by the
// instruction in the WB stage on the rising clock edge. Register R0 always
// reads zero and ignores writes.
//
// A write becomes visible to the read ports only after the clock edge that
// performs it: a read in the same cycle returns the old value. The
// processor covers that case with its bypasses and the additional register
// rather than inside the bank. The register count and width follow the
// 5-bit register fields and 32-bit data path of the design; R0 = 0 and the
// synchronous reset of all registers to zero are this design's choices.
module regfile (
  input  logic           clk,
  input  logic           rst_n,
  input  rpp_pkg::reg_t  ra1,
  output rpp_pkg::word_t rd1,
  input  rpp_pkg::reg_t  ra2,
  output rpp_pkg::word_t rd2,
  input  logic           we,
  input  rpp_pkg::reg_t  wa,
  input  rpp_pkg::word_t wd,
  // observation port
  input  rpp_pkg::reg_t  dbg_addr,
  output rpp_pkg::word_t dbg_data
);
  import rpp_pkg::*;
  word_t regs [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) regs[r] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1      = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2      = (ra2 == '0) ? '0 : regs[ra2];
  assign dbg_data = (dbg_addr == '0) ? '0 : regs[dbg_addr];
endmodule
