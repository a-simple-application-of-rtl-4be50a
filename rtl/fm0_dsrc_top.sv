// fm0_dsrc_top: FM0 transmit path for DSRC - buffer, memory, ring counter
// and FM0 encoder.
//
// Words arrive on a valid/ready port and pass through the input buffer into
// the memory block, which is used as a circular queue (write and read
// pointers, a fill level). The transmit side reads the oldest word ahead of
// time into a one-word prefetch register; when the word being sent ends,
// the prefetched word becomes the current word and the ring counter is
// restarted. The ring counter's active stage k selects bit WIDTH-1-k of the
// current word (most significant bit first) as the encoder's data bit X, one
// bit per clock. So as long as the memory holds words the line carries an
// unbroken FM0 stream at one bit per clock period; when it runs dry the
// encoder is disabled and the line idles low (tx_active low) until the next
// word arrives.
//
// The order of the blocks follows the block diagram of the design (input
// buffer, memory, ring counter, encoder). The queue pointers, the prefetch
// register, the bit order and the idle behaviour are this design's own
// choices.
//
// Timing: a word accepted on the input port at edge n is written to memory
// at edge n+1, read at n+2, prefetched at n+3 and, if the line is idle,
// starts being sent in the clock period after edge n+4. Within a symbol
// period fm0_out shows the first half-symbol while clk is high and the
// second while clk is low.
module fm0_dsrc_top #(
  parameter int unsigned WIDTH = fm0_pkg::DATA_W,
  parameter int unsigned DEPTH = fm0_pkg::MEM_DEPTH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [WIDTH-1:0]       in_data,
  input  logic                   in_valid,
  output logic                   in_ready,
  output logic                   fm0_out,    // FM0 line signal
  output logic                   tx_active,  // a symbol is on the line
  output logic [$clog2(DEPTH):0] mem_level   // words stored in memory
);

  localparam int unsigned AW = $clog2(DEPTH);

  // ---------------- input buffer -> memory ----------------
  logic [WIDTH-1:0] buf_data;
  logic             buf_valid, buf_ready;
  logic             mem_full, mem_empty;
  logic             wr_en, rd_en;
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      level_q;
  logic [WIDTH-1:0] rd_data;
  logic [WIDTH-1:0] ring_q;
  logic             ring_last;

  input_buffer #(.WIDTH(WIDTH)) u_input_buffer (
    .clk, .rst_n,
    .in_data, .in_valid, .in_ready,
    .out_data (buf_data),
    .out_valid(buf_valid),
    .out_ready(buf_ready)
  );

  assign mem_full  = (level_q == (AW+1)'(DEPTH));
  assign mem_empty = (level_q == '0);
  assign buf_ready = !mem_full;
  assign wr_en     = buf_valid && !mem_full;

  memory_block #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_memory_block (
    .clk,
    .we   (wr_en),
    .waddr(wr_ptr),
    .wdata(buf_data),
    .re   (rd_en),
    .raddr(rd_ptr),
    .rdata(rd_data)
  );

  // ---------------- memory -> prefetch register ----------------
  logic             rd_pending;   // rd_data is valid in this cycle
  logic [WIDTH-1:0] nxt_word;
  logic             nxt_valid;
  logic             word_done;    // current word has ended (or none is sent)
  logic             take;         // prefetched word becomes the current word

  assign rd_en     = !mem_empty && !nxt_valid && !rd_pending;
  assign word_done = !tx_active || ring_last;
  assign take      = word_done && nxt_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      level_q    <= '0;
      rd_pending <= 1'b0;
      nxt_valid  <= 1'b0;
      nxt_word   <= '0;
    end else begin
      if (wr_en) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (rd_en) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      level_q    <= level_q + (AW+1)'(wr_en) - (AW+1)'(rd_en);
      rd_pending <= rd_en;
      if (rd_pending) begin
        nxt_word  <= rd_data;
        nxt_valid <= 1'b1;
      end else if (take) begin
        nxt_valid <= 1'b0;
      end
    end
  end

  assign mem_level = level_q;

  // ---------------- ring counter + bit select ----------------
  logic [WIDTH-1:0] tx_word;
  logic             tx_bit;

  ring_counter #(.N(WIDTH)) u_ring_counter (
    .clk, .rst_n,
    .load(take),
    .en  (tx_active && !take),
    .q   (ring_q),
    .last(ring_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_active <= 1'b0;
      tx_word   <= '0;
    end else if (word_done) begin
      tx_active <= nxt_valid;
      if (nxt_valid) tx_word <= nxt_word;
    end
  end

  // stage k of the ring sends bit WIDTH-1-k (most significant bit first)
  always_comb begin
    tx_bit = 1'b0;
    for (int k = 0; k < WIDTH; k++)
      tx_bit = tx_bit | (ring_q[k] & tx_word[WIDTH-1-k]);
  end

  // ---------------- FM0 encoder ----------------
  fm0_encoder u_fm0_encoder (
    .clk, .rst_n,
    .en     (tx_active),
    .x      (tx_bit),
    .fm0_out(fm0_out),
    .state_b()
  );

  // ---------------- queue rules ----------------
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) level_q <= (AW+1)'(DEPTH);
  endproperty
  assert property (p_no_overflow) else $error("memory queue overflow");

  property p_no_read_empty;
    @(posedge clk) disable iff (!rst_n) rd_en |-> !mem_empty;
  endproperty
  assert property (p_no_read_empty) else $error("read from empty memory queue");

endmodule
