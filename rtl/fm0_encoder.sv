// fm0_encoder: FM0 (bi-phase space) line encoder, one data bit per clock.
//
// FM0 rules: the line level inverts at every symbol boundary; a '0' bit
// inverts it again in the middle of the symbol, a '1' bit keeps it constant
// for the whole symbol. Each symbol is described by a two-bit state code
// (A, B): A is the level of the first half, B the level of the second half.
// From the four-state machine the next state follows as
//     A(t) = ~B(t-1)          (boundary inversion)
//     B(t) =  X ^ B(t-1)      (mid-symbol inversion when X = 0)
// Since A(t) depends on B(t-1) alone, only B needs a flip-flop (the
// area-compact retiming): the register holds B(t-1), an inverter gives A(t)
// and an XOR gives B(t). The clock then selects the half-symbol:
//     fm0_out = CLK ? A(t) : B(t)
// so the high phase of the symbol clock carries A and the low phase carries B.
//
// Interface and timing: the symbol occupies one clock period starting at a
// rising edge. `x` and `en` must be stable for that whole period (they come
// from registers in this design). At the rising edge that ends the symbol
// the register takes B(t). The register resets to 1, i.e. the state machine
// starts from state S1 = (1,1) as the FSM description assumes.
//
// This design's own choices: with `en` low no symbol is sent, the state is
// held and the line is driven low (idle); only the FM0 mode is built, the
// second code of the shared mux is not.
//
// The clock drives the output multiplexer as a data input on purpose: that
// is how the architecture forms the half-symbol levels.
module fm0_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic en,       // a symbol is sent in this clock period
  input  logic x,        // data bit X of the current symbol
  output logic fm0_out,  // FM0 line signal
  output logic state_b   // stored state bit B(t-1)
);

  logic b_q;   // DFFB: B(t-1)
  logic a_t;   // A(t), level of the first half-symbol
  logic b_t;   // B(t), level of the second half-symbol

  always_comb begin
    a_t = ~b_q;
    b_t = x ^ b_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  b_q <= 1'b1;
    else if (en) b_q <= b_t;
  end

  // mux_1: the clock level picks the half-symbol
  assign fm0_out = en & (clk ? a_t : b_t);
  assign state_b = b_q;

endmodule
