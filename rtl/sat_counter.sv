// sat_counter: n-bit saturating branch-history counter.
//
// This is the state machine of the one-level branch predictor. A taken
// decision increments the counter unless it already holds its maximum
// 2^N-1; a not-taken decision decrements it unless it is zero. The
// prediction is "taken" when the value is 2^(N-1) or more. With N = 2 this
// is the four-state FSM in which the prediction only changes after two
// consecutive wrong guesses.
//
// Interface: `alloc` (re)starts the counter for a newly recorded branch at
// INIT and applies that branch's first decision `taken` in the same cycle;
// `update` applies `taken` to the current value. Both act on the rising
// clock edge; `cnt` and `pred` are the registered value and its prediction.
// The update rule, the threshold, N = 2 and INIT = "01" follow the design
// description; the synchronous active-low reset value (INIT) is this
// design's choice.
module sat_counter #(
  parameter int unsigned N    = 2,
  parameter int unsigned INIT = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         alloc,
  input  logic         update,
  input  logic         taken,
  output logic [N-1:0] cnt,
  output logic         pred
);
  localparam logic [N-1:0] MAXV  = '1;
  localparam logic [N-1:0] INITV = N'(INIT);

  function automatic logic [N-1:0] step(input logic [N-1:0] v, input logic t);
    if (t) return (v == MAXV) ? v : v + 1'b1;
    else   return (v == '0)   ? v : v - 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n)      cnt <= INITV;
    else if (alloc)  cnt <= step(INITV, taken);
    else if (update) cnt <= step(cnt, taken);
  end

  assign pred = cnt[N-1];
endmodule
