// input_buffer: holding register between the data source and the memory.
//
// Incoming words wait here until the memory block can take them. It is a
// one-entry buffer with a valid/ready handshake on both sides: a word moves
// on a side in a cycle where both valid and ready are high. The buffer
// accepts a new word whenever it is empty or its word leaves in the same
// cycle, so back-to-back words pass at one per clock while the memory has
// room, and the source is held off (in_ready low) while the memory is full.
// The handshake and the one-entry depth are this design's choices; the
// block diagram only gives the buffer's role.
//
// Timing: a word accepted at a rising edge is offered on out_data from that
// edge on (one cycle of latency).
module input_buffer #(
  parameter int unsigned WIDTH = fm0_pkg::DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready
);

  logic [WIDTH-1:0] data_q;
  logic             full_q;

  assign in_ready  = !full_q || out_ready;
  assign out_data  = data_q;
  assign out_valid = full_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= 1'b0;
      data_q <= '0;
    end else begin
      if (in_valid && in_ready) begin
        data_q <= in_data;
        full_q <= 1'b1;
      end else if (out_ready) begin
        full_q <= 1'b0;
      end
    end
  end

  // a held word stays put until it is taken
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_data);
  endproperty
  assert property (p_hold) else $error("input_buffer dropped or changed a held word");

endmodule
