// memory_block: random-access word memory of the transmit path.
//
// DEPTH words of WIDTH bits, any of which can be written or read in any
// order. One write port and one read port, both synchronous to `clk`, so a
// word can be stored while another is read out for encoding. Reading takes
// one clock: rdata holds the word of raddr from the rising edge after `re`
// until the next read. A read of the address written in the same cycle
// returns the old contents. The port arrangement and the registered read are
// this design's choices; the contents are not reset (the control logic never
// reads a word before writing it).
module memory_block #(
  parameter int unsigned WIDTH = fm0_pkg::DATA_W,
  parameter int unsigned DEPTH = fm0_pkg::MEM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
