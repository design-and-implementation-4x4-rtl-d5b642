// router_tb: five-port router against a scoreboard.
//   1. Latency: a lone packet appears on its output two cycles after it was
//      presented, with its hop count decremented. The packet is the read
//      request from node 1 to node 12 of the paper's router waveform,
//      06cc000000110 in on the north port, 02cc000000110 out on the south.
//   2. Contention: packets from north and south that both need the east
//      output in the same cycle leave one after the other.
//   3. Random traffic on all five inputs with random busy on all outputs.
//      Senders obey busy_out; every packet must leave on the output its
//      route fields select, changed as the route rule says, exactly once and
//      in order with the other packets of the same input and output.
// Counts arbitration conflicts and back-pressure cycles and fails if either
// never happened.
module router_tb;
  import noc_pkg::*;
  logic clk = 0, nreset = 0;
  pkt_t local_pkt_in, local_pkt_out;
  logic local_busy_in, local_busy_out;
  pkt_t pkt_in [4:1], pkt_out [4:1];
  logic busy_in [4:1], busy_out [4:1];
  int checks = 0, failures = 0;
  int conflicts = 0, backpressure = 0, delivered = 0, sent = 0;
  pkt_t exp_q [5][5][$];   // [output][input]
  logic rnd_busy [5];
  bit   random_phase = 0;

  router #(.IN_DEPTH(4), .OUT_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", msg, $time); end
  endtask

  // independent route rule: Y first, then X, then local
  function automatic int exp_port(pkt_t p, output pkt_t q);
    q = p;
    if (p.ycnt != 0) begin q.ycnt = p.ycnt - 1; return p.ydir ? 1 : 3; end
    if (p.xcnt != 0) begin q.xcnt = p.xcnt - 1; return p.xdir ? 4 : 2; end
    return 0;
  endfunction

  function automatic pkt_t get_out(int o);
    return (o == 0) ? local_pkt_out : pkt_out[o];
  endfunction

  function automatic logic get_busy(int i);
    return (i == 0) ? local_busy_out : busy_out[i];
  endfunction

  task automatic drive(int i, pkt_t p);
    if (i == 0) local_pkt_in = p; else pkt_in[i] = p;
  endtask

  function automatic pkt_t rand_pkt(int tag);
    pkt_t p;
    p = pkt_t'({$urandom, $urandom});
    {p.rd, p.wr, p.rr} = 3'b001 << ($urandom % 3);
    p.body[15:0] = 16'(tag);
    return p;
  endfunction

  // scoreboard on every output
  always @(posedge clk) if (nreset) begin
    for (int o = 0; o < 5; o++) begin
      pkt_t p;
      p = get_out(o);
      if (pkt_valid(p)) begin
        bit found;
        found = 0;
        check(!((o == 0) ? local_busy_in : busy_in[o]), "no send while busy");
        for (int i = 0; i < 5; i++)
          if (!found && exp_q[o][i].size() > 0 && exp_q[o][i][0] == p) begin
            found = 1;
            void'(exp_q[o][i].pop_front());
          end
        check(found, $sformatf("output %0d packet %h expected", o, p));
        delivered++;
      end
    end
    for (int o = 0; o < 5; o++)
      if ($countones(dut.req[o]) > 1) conflicts++;
    for (int i = 0; i < 5; i++) if (get_busy(i)) backpressure++;
  end

  always @(negedge clk) if (random_phase) begin
    local_busy_in = ($urandom % 3) == 0;
    for (int d = 1; d <= 4; d++) busy_in[d] = ($urandom % 3) == 0;
  end

  task automatic send(int i, pkt_t p);
    pkt_t q;
    int o;
    o = exp_port(p, q);
    exp_q[o][i].push_back(q);
    drive(i, p);
    sent++;
  endtask

  initial begin
    local_pkt_in = '0; local_busy_in = 0;
    for (int d = 1; d <= 4; d++) begin pkt_in[d] = '0; busy_in[d] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk); nreset = 1;

    // 1. latency of a lone packet: north in, Y count 1 south, out on south
    begin
      pkt_t p;
      p = '0; p.ycnt = 2'd1; p.xdir = 1'b1; p.xcnt = 2'd1; p.rd = 1'b1;
      p.obj = 4'hC; p.body = 36'h0000_0011_0;
      send(1, p);
      @(negedge clk); drive(1, '0);
      check(!pkt_valid(pkt_out[3]), "not yet after one cycle");
      @(negedge clk);
      check(pkt_valid(pkt_out[3]) && pkt_out[3].ycnt == 2'd0 && pkt_out[3].xcnt == 2'd1,
            "two-cycle hop, Y count decremented");
      // the read request 1 -> 12 seen in the paper's router waveform
      check(p == 49'h06cc000000110 && pkt_out[3] == 49'h02cc000000110,
            $sformatf("waveform packet %h -> %h", p, pkt_out[3]));
      @(negedge clk);
    end

    // 2. contention: north and south both to east in the same cycle
    begin
      pkt_t a, b;
      int first, second;
      a = '0; a.xcnt = 2'd2; a.wr = 1'b1; a.body = 36'hA;
      b = '0; b.xcnt = 2'd1; b.wr = 1'b1; b.body = 36'hB;
      send(1, a); send(3, b);
      @(negedge clk); drive(1, '0); drive(3, '0);
      first = -1; second = -1;
      for (int c = 0; c < 6; c++) begin
        @(negedge clk);
        if (pkt_valid(pkt_out[2])) begin
          if (first < 0) first = c; else second = c;
        end
      end
      check(first == 0 && second == 1, $sformatf("contention serialised %0d %0d", first, second));
    end

    // 3. random traffic
    random_phase = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      #1;
      for (int i = 0; i < 5; i++) begin
        if (!get_busy(i) && ($urandom % 2)) send(i, rand_pkt(sent));
        else drive(i, '0);
      end
    end
    @(negedge clk);
    for (int i = 0; i < 5; i++) drive(i, '0);
    random_phase = 0;
    local_busy_in = 0;
    for (int d = 1; d <= 4; d++) busy_in[d] = 0;
    repeat (60) @(negedge clk);
    for (int o = 0; o < 5; o++)
      for (int i = 0; i < 5; i++)
        check(exp_q[o][i].size() == 0, $sformatf("undelivered %0d->%0d", i, o));
    check(delivered == sent, $sformatf("delivered %0d of %0d", delivered, sent));
    check(conflicts > 0, "arbitration conflicts seen");
    check(backpressure > 0, "back-pressure seen");
    $display("router_tb: sent %0d, conflicts %0d, busy cycles %0d", sent, conflicts, backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
