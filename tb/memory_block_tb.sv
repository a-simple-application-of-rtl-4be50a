// memory_block_tb: self-checking test of the word memory.
//
// Writes and reads random addresses, often in the same cycle, and compares
// every read with a shadow array kept in the testbench. Checks the one-cycle
// read latency, that the read data holds between reads, and that a read of
// the address being written returns the old word.
module memory_block_tb;
  localparam int W = 8, D = 16, AW = $clog2(D);
  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] shadow [D];
  int checks = 0, failures = 0, collisions = 0;

  memory_block #(.WIDTH(W), .DEPTH(D)) dut (.*);

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

  initial begin
    logic [W-1:0] expect_q, last_read;
    logic pending;
    // fill every word first so all reads are defined
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = W'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    pending = 1'b0;
    last_read = '0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // result of the previous cycle's read
      if (pending) begin
        check(rdata == expect_q, "read data");
        last_read = expect_q;
      end else if (i > 0) begin
        check(rdata == last_read, "read data held without re");
      end
      we = ($urandom % 2) != 0;
      re = ($urandom % 3) != 0;
      waddr = AW'($urandom);
      raddr = ($urandom % 4 == 0) ? waddr : AW'($urandom);
      wdata = W'($urandom);
      if (re) expect_q = shadow[raddr];   // old contents on a collision
      if (we && re && waddr == raddr) collisions++;
      pending = re;
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
    end
    check(collisions > 0, "read/write collision exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
