// lfsr_counter: event counter built as a two-tap maximal-length linear feedback
// shift register.
//
// Instead of a binary adder, the count is kept as the state of a WIDTH-bit
// Fibonacci LFSR: on every enabled rising clock edge the register shifts left and
// the new bit 0 is s[TAP_A-1] ^ s[TAP_B-1]. With the default taps (20,17),
// x^20 + x^17 + 1 is primitive, so the state walks through all 2^20 - 1 non-zero
// values before it repeats: up to 1,048,574 events are counted without
// ambiguity. The critical path is a single XOR, which is why the converter uses it
// in place of a ripple counter. The number of events n is recovered off line as
// the position of the state in the sequence that starts at SEED.
//
// Interface: en is sampled on the rising edge of clk; rst_n (asynchronous,
// active low) loads SEED, which stands for a count of 0. count_out is the raw
// LFSR state. Follows the document: 20 bits, two taps, maximal length, counter
// enabled by the last synchronizer flip-flop. This design's choice: the tap pair,
// the seed and the reset.
`timescale 1ps / 1fs
module lfsr_counter #(
  parameter int unsigned      WIDTH = 20,
  parameter int unsigned      TAP_A = 20,
  parameter int unsigned      TAP_B = 17,
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] count_out
);

  logic [WIDTH-1:0] state;
  logic             feedback;

  assign feedback = state[TAP_A-1] ^ state[TAP_B-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[WIDTH-2:0], feedback};
  end

  assign count_out = state;

  initial begin
    assert (TAP_A <= WIDTH && TAP_B <= WIDTH && TAP_A != TAP_B && SEED != '0)
      else $error("lfsr_counter: invalid taps or all-zero seed");
  end

endmodule
