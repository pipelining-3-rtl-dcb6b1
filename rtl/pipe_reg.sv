// pipe_reg: one pipeline register bank with stall and bubble controls.
//
// Every clock edge the bank loads its input, unless
//   stall  = 1: it keeps its old value (input <- own output), so the
//               instruction in the following stage stays there one more cycle;
//   bubble = 1: it loads DEFAULT, a no-operation, so the following stage
//               does nothing next cycle.
// Both controls are MUX selects in front of the flip-flops, as in the
// stall/bubble register banks this design follows. Asserting both at once is a
// control error and is flagged by an assertion. Synchronous reset also loads
// DEFAULT (reset behaviour is this design's choice).
//
// Parameters: T is the type of the bank (a packed struct per pipeline
// register), DEFAULT its bubble/reset value. Timing: q changes only on the
// rising clock edge; stall/bubble are sampled at that edge.
module pipe_reg #(
  parameter type T       = logic [7:0],
  parameter T    DEFAULT = T'(8'hFF)
) (
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic bubble,
  input  T     d,
  output T     q
);

  T next;

  always_comb begin
    if (bubble)      next = DEFAULT;
    else if (stall)  next = q;
    else             next = d;
  end

  always_ff @(posedge clk) begin
    if (rst) q <= DEFAULT;
    else     q <= next;
  end

  // A stage cannot both hold its instruction and replace it with a no-op.
  a_not_both: assert property (@(posedge clk) disable iff (rst) !(stall && bubble))
    else $error("pipe_reg: stall and bubble asserted together");

endmodule
