// slave_node_tb: slave node 4 (row 1, column 0) with a three-cycle memory.
// The testbench plays its neighbours: master 0 to the north and router 5 to
// the east. It writes random bytes to random addresses, reads them back and
// checks that each read return leaves on the port toward the requester with
// the route fields spent for that hop and the byte last written there. It
// also checks the slave's led_output and that busy_out stops new packets
// while the slave is serving one.
module slave_node_tb;
  import noc_pkg::*;
  logic clk = 0, nreset = 0;
  pkt_t pkt_in [4:1], pkt_out [4:1];
  logic busy_in [4:1], busy_out [4:1];
  logic [7:0] led_output;
  int checks = 0, failures = 0;
  logic [7:0] mem [8];
  int returns = 0, busy_seen = 0;

  slave_node #(.NODE_ID(4'd4), .READ_LATENCY(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", msg, $time); end
  endtask

  always @(posedge clk) if (nreset) if (busy_out[1] || busy_out[2]) busy_seen++;

  // send one packet from the north (src 0) or east (src 5) neighbour
  task automatic send(int from, pkt_t p);
    while (busy_out[from]) @(negedge clk);
    pkt_in[from] = p;
    @(negedge clk);
    pkt_in[from] = '0;
  endtask

  task automatic write(int from, logic [2:0] a, logic [7:0] d);
    pkt_t p;
    p = '0; p.wr = 1'b1; p.obj = 4'd4; p.body = {25'h0, a, d};
    send(from, p);
    mem[a] = d;
  endtask

  task automatic read(int from, logic [2:0] a);
    pkt_t p, r;
    int src, port, t;
    src  = (from == 1) ? 0 : 5;
    port = from;
    p = '0; p.rd = 1'b1; p.obj = 4'd4; p.body = {25'h0, a, 4'(src), 4'h0};
    send(from, p);
    t = 0;
    while (!pkt_valid(pkt_out[port]) && t < 40) begin @(negedge clk); t++; end
    r = pkt_out[port];
    // return 4 -> 0 goes north (ydir 1), 4 -> 5 goes east (xdir 0)
    check(r.rr && !r.rd && !r.wr && r.obj == 4'(src), "return type and objective");
    check(r.ycnt == 2'd0 && r.xcnt == 2'd0 && r.ydir == (from == 1), "return route");
    check(r.body == {mem[a], 28'h0}, $sformatf("read data %h exp %h", r.body[35:28], mem[a]));
    returns++;
    @(negedge clk);
  endtask

  initial begin
    for (int d = 1; d <= 4; d++) begin pkt_in[d] = '0; busy_in[d] = 0; end
    for (int i = 0; i < 8; i++) mem[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); nreset = 1;
    for (int n = 0; n < 200; n++) begin
      logic [2:0] a;
      int from;
      a = 3'($urandom);
      from = ($urandom % 2) ? 1 : 2;
      if ($urandom % 2) begin
        logic [7:0] d;
        d = 8'($urandom);
        write(from, a, d);
        repeat (6) @(negedge clk);
        check(led_output == d, "led_output shows last write");
      end else read(from, a);
    end
    // burst: back-to-back writes from the north fill the buffers
    for (int n = 0; n < 24; n++) write(1, 3'(n), 8'(n * 7 + 1));
    for (int n = 0; n < 8; n++) read(2, 3'(n));
    check(returns > 20, "read returns seen");
    check(busy_seen > 0, "slave busy seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
