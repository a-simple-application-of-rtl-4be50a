// fm0_encoder_tb: self-checking test of the FM0 encoder.
//
// Sends random bits, with random idle cycles, and samples the line once in
// each half of every symbol. A reference model kept here, written from the
// FM0 rules rather than from the encoder's equations, predicts both halves:
// the first half is the inverse of the previous symbol's second half, and
// the second half equals the first for a '1' and is its inverse for a '0'.
// It also checks the rules directly (transition at every boundary, mid-symbol
// transition exactly for '0'), the one-symbol-per-clock rate, the idle-low
// line and the state sequence of the transition table starting from S1.
module fm0_encoder_tb;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, x = 1'b0;
  logic fm0_out, state_b;
  int   checks = 0, failures = 0;

  fm0_encoder dut (.clk, .rst_n, .en, .x, .fm0_out, .state_b);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one symbol period: drive en/x just after the rising edge, sample each half
  logic prev_h2 = 1'b1;   // reset state S1 = (1,1): last half level is B = 1
  int   symbols = 0;
  task automatic symbol(input logic e, input logic b);
    logic h1, h2, exp_h1, exp_h2;
    @(posedge clk); #1;
    en = e; x = b;
    #2 h1 = fm0_out;                 // clk high: first half
    @(negedge clk); #2 h2 = fm0_out; // clk low: second half
    if (e) begin
      exp_h1 = ~prev_h2;
      exp_h2 = b ? exp_h1 : ~exp_h1;
      check(h1 == exp_h1, "first half level");
      check(h2 == exp_h2, "second half level");
      check(h1 != prev_h2, "transition at symbol boundary");
      check((h1 == h2) == b, "mid-symbol transition only for 0");
      prev_h2 = h2;
      symbols++;
    end else begin
      check(h1 == 1'b0 && h2 == 1'b0, "idle line low");
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time start_t; int n_sym;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(state_b == 1'b1, "reset state S1 (B=1)");

    // transition table from S1: X=0 -> S3 (0,1), then X=1 -> S4 (0,0)
    symbol(1'b1, 1'b0);
    @(posedge clk); #1 check(state_b == 1'b1, "S1 --0--> S3, B=1");
    en = 1'b0;
    symbol(1'b1, 1'b1);
    @(posedge clk); #1 check(state_b == 1'b0, "S3 --1--> S4, B=0");
    en = 1'b0;

    // long random run with idle gaps
    for (int i = 0; i < 2000; i++)
      symbol(($urandom % 8) != 0, 1'($urandom));

    // rate: 64 back-to-back symbols take 64 clock periods
    start_t = $time; n_sym = symbols;
    for (int i = 0; i < 64; i++) symbol(1'b1, 1'($urandom));
    check(symbols - n_sym == 64, "64 symbols sent");
    check(($time - start_t) == 64 * 10, "one symbol per clock period");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
