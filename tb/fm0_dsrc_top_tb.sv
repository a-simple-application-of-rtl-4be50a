// fm0_dsrc_top_tb: end-to-end test of the FM0 transmit path, at the
// design's default sizes (8-bit words, 16-word memory).
//
// A source pushes words through the valid/ready port; every accepted word is
// recorded. A line monitor samples fm0_out in both halves of every clock
// period, checks the FM0 rules (idle line low, a level change at every
// symbol boundary), decodes each bit (no mid-symbol change = 1), packs the
// bits most significant first and compares each word with the recorded
// ones, in order. Three phases:
//   1. a burst of 40 back-to-back words: the memory fills, the input port is
//      held off, and the line must then carry all 40 words as one unbroken
//      run of 320 symbols (one bit per clock);
//   2. single words with the line idle in between: each must start on the
//      line exactly 4 clocks after it is accepted;
//   3. random traffic.
// Counts each mechanism (back-pressure, memory full, idle gap, back-to-back
// word hand-over, ring wrap, memory address wrap) and fails if one never
// occurred.
module fm0_dsrc_top_tb;
  localparam int W = 8, D = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] in_data = '0;
  logic in_valid = 1'b0, in_ready, fm0_out, tx_active;
  logic [$clog2(D):0] mem_level;
  int checks = 0, failures = 0;

  fm0_dsrc_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_full = 0, n_idle_gap = 0, n_handover = 0, n_ring_wrap = 0,
      n_addr_wrap = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready)                        n_stall++;
    if (mem_level == ($clog2(D)+1)'(D))                              n_full++;
    if (dut.take && dut.tx_active)                    n_handover++;
    if (dut.ring_last && dut.tx_active)               n_ring_wrap++;
    if (dut.wr_en && dut.wr_ptr == $clog2(D)'(D - 1)) n_addr_wrap++;
  end

  // ---------------- line monitor / decoder ----------------
  logic [W-1:0] sent_q[$];
  int   words_ok = 0, words_rx = 0, run = 0, max_run = 0;
  time  t_rise = 0;
  initial begin
    automatic logic act, prev_act = 1'b0, h1, h2, prev_h2 = 1'b1;
    automatic logic [W-1:0] shreg = '0;
    automatic int nbits = 0;
    forever begin
      @(posedge clk); #1 act = tx_active;
      #2 h1 = fm0_out;
      @(negedge clk); #2 h2 = fm0_out;
      if (!rst_n) continue;
      if (act) begin
        check(h1 != prev_h2, "level change at symbol boundary");
        shreg = {shreg[W-2:0], (h1 == h2)};
        nbits++;
        if (nbits == W) begin
          nbits = 0;
          words_rx++;
          check(sent_q.size() > 0, "decoded word was sent");
          if (sent_q.size() > 0) begin
            logic [W-1:0] e;
            e = sent_q.pop_front();
            check(shreg == e, "decoded word matches sent word");
            if (shreg == e) words_ok++;
            else $display("  got %h expected %h", shreg, e);
          end
        end
        prev_h2 = h2;
        run++;
      end else begin
        check(h1 == 1'b0 && h2 == 1'b0, "idle line low");
        check(nbits == 0, "line goes idle only at a word boundary");
        if (prev_act) n_idle_gap++;
        if (run > max_run) max_run = run;
        run = 0;
      end
      prev_act = act;
    end
  end

  // ---------------- source ----------------
  time t_acc;
  // offer a word for one or more cycles until it is accepted
  task automatic send(input logic [W-1:0] w);
    @(negedge clk); #1;
    in_valid = 1'b1; in_data = w;
    forever begin
      #3;  // just before the rising edge
      if (in_ready) begin
        sent_q.push_back(w);
        @(posedge clk); t_acc = $time;
        break;
      end
      @(posedge clk); #1;
      @(negedge clk); #1;
    end
    @(negedge clk); #1 in_valid = 1'b0;
  endtask

  // back-to-back: keep valid high across cycles
  task automatic burst(input int n);
    int i = 0;
    @(negedge clk); #1;
    while (i < n) begin
      in_valid = 1'b1;
      #3;
      if (in_ready) begin
        sent_q.push_back(in_data);
        i++;
        @(posedge clk); #1;
        in_data = W'($urandom);
      end else begin
        @(posedge clk); #1;
      end
      @(negedge clk); #1;
    end
    in_valid = 1'b0;
  endtask

  task automatic wait_idle();
    do @(posedge clk); while (tx_active || mem_level != 0 || dut.nxt_valid ||
                              dut.rd_pending || dut.u_input_buffer.out_valid);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!tx_active && mem_level == 0 && in_ready, "idle after reset");

    // phase 1: burst
    in_data = W'($urandom);
    burst(40);
    wait_idle();
    check(max_run == 40 * W, "40 words leave as one unbroken run of 320 symbols");
    $display("phase 1: longest run %0d symbols", max_run);

    // phase 2: isolated words, latency
    for (int i = 0; i < 12; i++) begin
      send(W'($urandom));
      wait (tx_active);
      t_rise = $time;
      check(t_rise - t_acc == 4 * 10, "first symbol 4 clocks after acceptance");
      if (t_rise - t_acc != 4 * 10) $display("  latency %0t", t_rise - t_acc);
      wait_idle();
      repeat ($urandom % 5) @(posedge clk);
    end

    // phase 3: random traffic
    for (int i = 0; i < 150; i++) begin
      send(W'($urandom));
      repeat ($urandom % 14) @(posedge clk);
    end
    wait_idle();

    check(sent_q.size() == 0, "every accepted word was sent on the line");
    check(words_rx == 40 + 12 + 150 && words_ok == words_rx, "all 202 words decoded correctly");
    check(n_stall > 0,     "back-pressure on the input port happened");
    check(n_full > 0,      "memory full happened");
    check(n_idle_gap > 1,  "line went idle between words");
    check(n_handover > 0,  "back-to-back word hand-over happened");
    check(n_ring_wrap > 0, "ring counter wrapped");
    check(n_addr_wrap > 0, "memory address wrapped");
    $display("stall=%0d full=%0d idle_gaps=%0d handover=%0d ring_wrap=%0d addr_wrap=%0d words=%0d",
             n_stall, n_full, n_idle_gap, n_handover, n_ring_wrap, n_addr_wrap, words_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
