// btb: branch prediction unit of the IF stage.
//
// A direct-mapped Branch-Target Buffer whose lines hold the address of a
// branch instruction (tag), its jump address and an n-bit saturating
// counter (one-level predictor). The line is selected by the least
// significant bits of the word address of the instruction.
//
// Lookup (combinational, IF stage): when `lk_pc` is found in its line and
// the counter predicts taken, `lk_taken` is set and `lk_target` gives the
// next fetch address; otherwise the instruction is treated as not a branch
// (or a not-taken one) and fetch continues sequentially.
// Update (rising clock edge, from EXE): for a resolved branch at `up_pc`,
// an existing line has its target refreshed and its counter stepped by
// `up_taken`; a branch not yet recorded replaces whatever the line held,
// with the counter started at "01" and then stepped by the decision.
//
// The lookup/update algorithm and the "01" start value follow the design
// description. Direct mapping with replace-on-miss, ENTRIES = 16 and
// keeping the full word address as tag are this design's own choices.
module btb #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned CNT_W   = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // IF-stage lookup
  input  rpp_pkg::word_t     lk_pc,
  output logic               lk_hit,
  output logic               lk_taken,
  output rpp_pkg::word_t     lk_target,
  output logic [CNT_W-1:0]   lk_cnt,
  // EXE-stage update
  input  logic               up_en,
  input  rpp_pkg::word_t     up_pc,
  input  rpp_pkg::word_t     up_target,
  input  logic               up_taken
);
  import rpp_pkg::*;
  localparam int IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int TW = 30 - IW;

  logic [ENTRIES-1:0] valid;
  logic [TW-1:0]      tag    [ENTRIES];
  word_t              target [ENTRIES];
  logic [CNT_W-1:0]   cnt    [ENTRIES];
  logic [ENTRIES-1:0] pred;

  logic [IW-1:0] lk_idx, up_idx;
  logic [TW-1:0] lk_tag, up_tag;
  logic          up_hit;

  assign lk_idx = lk_pc[IW+1:2];
  assign lk_tag = lk_pc[31:IW+2];
  assign up_idx = up_pc[IW+1:2];
  assign up_tag = up_pc[31:IW+2];
  assign up_hit = valid[up_idx] && (tag[up_idx] == up_tag);

  assign lk_hit    = valid[lk_idx] && (tag[lk_idx] == lk_tag);
  assign lk_taken  = lk_hit && pred[lk_idx];
  assign lk_target = target[lk_idx];
  assign lk_cnt    = cnt[lk_idx];

  for (genvar e = 0; e < int'(ENTRIES); e++) begin : g_line
    logic sel;
    assign sel = up_en && (up_idx == IW'(e));
    sat_counter #(.N(CNT_W), .INIT(1)) u_cnt (
      .clk    (clk),
      .rst_n  (rst_n),
      .alloc  (sel && !up_hit),
      .update (sel && up_hit),
      .taken  (up_taken),
      .cnt    (cnt[e]),
      .pred   (pred[e])
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        valid[e]  <= 1'b0;
        tag[e]    <= '0;
        target[e] <= '0;
      end else if (sel) begin
        valid[e]  <= 1'b1;
        tag[e]    <= up_tag;
        target[e] <= up_target;
      end
    end
  end
endmodule
