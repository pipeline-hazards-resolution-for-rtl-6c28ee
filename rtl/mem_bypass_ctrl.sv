// mem_bypass_ctrl: control of the MEM-stage input multiplexer.
//
// A store needs its data register (rt) in MEM. The value carried from EXE
// was already corrected there by the EXE bypasses for every producer
// except a load directly ahead, whose data is only produced in MEM while
// the store is in EXE. In MEM that load sits in WB, so the multiplexer
// takes the WB-stage bypass whenever the instruction in WB writes the
// store's data register; otherwise it keeps the carried value. No waiting
// cycle is ever needed in MEM. Combinational.
// sel: 0 carried value, 1 WB bypass. That MEM needs no stall and only a
// multiplexer setting follows the design description; which hazards are
// already fixed in EXE is this design's arrangement.
module mem_bypass_ctrl (
  input  logic                 mem_valid,
  input  logic                 mem_use_rt,
  input  rpp_pkg::reg_t        mem_rt,
  input  rpp_pkg::res_class_e  wb_res,
  input  rpp_pkg::reg_t        wb_rd,
  output logic                 sel
);
  import rpp_pkg::*;
  assign sel = mem_valid && mem_use_rt && (mem_rt != '0) &&
               (wb_res != RES_NONE) && (wb_rd == mem_rt);
endmodule
