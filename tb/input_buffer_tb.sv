// input_buffer_tb: self-checking test of the input holding buffer.
//
// A random source pushes numbered words and a random sink takes them. A
// queue in the testbench records every accepted word; each word leaving
// must be the oldest one recorded. Also checks that nothing is lost or
// duplicated, that a full buffer with a stalled sink refuses input, and that
// one word per clock passes when the sink is always ready.
module input_buffer_tb;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  int checks = 0, failures = 0, stalls = 0;
  logic [W-1:0] q[$];
  int sent = 0, got = 0;

  input_buffer #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample both handshakes just before each rising edge
  task automatic cycle();
    #4;  // at t = posedge - 1
    if (out_valid && out_ready) begin
      check(q.size() > 0, "word leaves only after one entered");
      if (q.size() > 0) check(out_data == q.pop_front(), "word order/content");
      got++;
    end
    if (in_valid && !in_ready) stalls++;
    if (in_valid && in_ready) begin
      q.push_back(in_data);
      sent++;
    end
    @(posedge clk); #1;
  endtask

  initial begin
    int t0, g0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!out_valid && in_ready, "empty after reset");
    @(negedge clk); #1;  // align: drive at negedge+1, sample at posedge-1
    for (int i = 0; i < 3000; i++) begin
      if (!in_valid || in_ready) begin
        in_valid = ($urandom % 3) != 0;
        in_data  = W'($urandom);
      end
      out_ready = ($urandom % 3) != 0;
      cycle();
    end
    // full and stalled: must refuse
    in_valid = 1'b1; in_data = 8'h5A; out_ready = 1'b0;
    cycle(); cycle();
    check(out_valid && !in_ready, "full buffer with stalled sink refuses input");
    // drain
    in_valid = 1'b0; out_ready = 1'b1;
    repeat (3) cycle();
    check(q.size() == 0 && sent == got, "nothing lost or duplicated");
    // streaming rate
    t0 = $time; g0 = got;
    in_valid = 1'b1; out_ready = 1'b1;
    for (int i = 0; i < 50; i++) begin
      in_data = W'(i);
      cycle();
    end
    in_valid = 1'b0;
    cycle();
    check(got - g0 == 50, "one word per clock when the sink is ready");
    check(stalls > 0, "back-pressure happened");
    $display("stalls=%0d words=%0d", stalls, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
