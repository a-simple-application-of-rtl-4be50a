// ring_counter_tb: self-checking test of the ring counter.
//
// Rotates, holds and restarts the counter at random and compares the stage
// vector and the last-stage flag every cycle with a model that keeps the
// position of the one as an integer modulo N. Counts the wrap-arounds from
// the last stage back to the first.
module ring_counter_tb;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [N-1:0] q;
  logic last;
  int checks = 0, failures = 0, wraps = 0;
  int pos = 0;

  ring_counter #(.N(N)) dut (.clk, .rst_n, .load, .en, .q, .last);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (q=%b pos=%0d)", what, $time, q, pos);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(q == N'(1), "reset to stage 0");
    for (int i = 0; i < 3000; i++) begin
      load = ($urandom % 20) == 0;
      en   = (i < 100) ? 1'b1 : (($urandom % 4) != 0);
      @(posedge clk); #1;
      if (load) pos = 0;
      else if (en) begin
        if (pos == N - 1) wraps++;
        pos = (pos + 1) % N;
      end
      check(q == (N'(1) << pos), "stage vector");
      check(last == (pos == N - 1), "last flag");
    end
    check(wraps > 0, "wrap-around happened");
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
