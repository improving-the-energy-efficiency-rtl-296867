// loop_counter: the increment counter that tells the loop cache controller
// when the triggering short backward branch is fetched again.
//
// A w-bit Count_Register is loaded, through a two-input multiplexer, either
// with the lower displacement field `ld` of the triggering branch (a negative
// number: minus the number of words the branch jumps back) or with its own
// value plus one. Counting one per sequential fetch from the loop start, the
// register reaches zero exactly when the fetch of the triggering branch has
// been accepted; `at_zero` compares the register with zero.
//
// Interface: `load` has priority over `inc`; with neither the value is held.
// Timing: `at_zero` reflects the register, so it is valid the cycle after the
// load or increment that produced zero.
//
// The structure (register, +1 adder, load multiplexer, zero comparator)
// follows the loop counter described for the technique. Comparing the
// register rather than the multiplexer output, and the reset value, are this
// design's choices.
module loop_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         inc,
  input  logic [W-1:0] ld,
  output logic [W-1:0] count,
  output logic         at_zero
);

  logic [W-1:0] count_q;
  logic [W-1:0] count_d;

  always_comb begin
    if (load)     count_d = ld;
    else if (inc) count_d = count_q + W'(1);
    else          count_d = count_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count_q <= '1;
    else        count_q <= count_d;
  end

  assign count   = count_q;
  assign at_zero = (count_q == '0);

endmodule
