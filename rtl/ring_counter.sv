// ring_counter: N-stage circular shift register carrying a single one.
//
// The output of the last stage feeds the first, so the one walks through
// the stages and wraps around: stage k is active during the k-th clock
// after a (re)start. In the transmit path the active stage picks the bit of
// the current word that goes to the FM0 encoder.
//
// Interface and timing: `load` (priority) puts the one in stage 0 at the
// next rising edge; `en` rotates it by one stage per clock. `last` is high
// while the one sits in stage N-1. Reset puts the one in stage 0, so the
// register never holds zero or several ones. The restart input is this
// design's addition to the plain ring of the block diagram.
module ring_counter #(
  parameter int unsigned N = fm0_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,  // restart at stage 0
  input  logic         en,    // rotate one stage
  output logic [N-1:0] q,     // one-hot stage vector
  output logic         last   // one is in the last stage
);

  localparam logic [N-1:0] FIRST = {{(N-1){1'b0}}, 1'b1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= FIRST;
    else if (load) q <= FIRST;
    else if (en)   q <= {q[N-2:0], q[N-1]};  // last stage wraps to the first
  end

  assign last = q[N-1];

  always_ff @(posedge clk)
    if (rst_n) assert ($onehot(q)) else $error("ring_counter lost its single one");

endmodule
