// packet_fifo_tb: random pushes and pops against a queue model. Checks the
// head data, empty, full and count every cycle, including simultaneous push
// and pop on a full buffer.
module packet_fifo_tb;
  localparam int W = 49, D = 4;
  logic clk = 0, nreset = 0;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  packet_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", msg, $time); end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    nreset = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(dout == q[0], "head data");
      din  = {$urandom, $urandom};
      push = ($urandom % 3) != 0;
      pop  = ($urandom % 3) == 0 || (n > 1500 && ($urandom % 2));
      if (full && !pop) push = 0;          // writer respects full
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
