// master_node_tb: master node 0 targeting slave 4 directly south of it. The
// testbench plays the south neighbour: it checks the write and read-request
// packets leaving on the south port (Y count already spent, fields as in
// the packet map, write at the start of each 32-cycle loop), answers each
// read request with a read-return packet carrying a fresh byte, and checks
// that the byte reaches test_leds. For a while it holds the south port busy
// and checks that nothing leaves and nothing is lost.
module master_node_tb;
  import noc_pkg::*;
  logic clk = 0, nreset = 0;
  pkt_t pkt_in [4:1], pkt_out [4:1];
  logic busy_in [4:1], busy_out [4:1];
  logic [7:0] test_leds;
  int checks = 0, failures = 0;
  int cyc = 0, writes = 0, reads = 0, held = 0;
  logic [7:0] answer;

  master_node #(.NODE_ID(4'd0), .TARGET_ID(4'd4), .LOCAL_ADDR(28'h5),
                .WR_DATA(8'hAA)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", msg, $time); end
  endtask

  always @(posedge clk) if (nreset) begin
    cyc <= cyc + 1;
    for (int d = 1; d <= 4; d++) if (d != 3) check(pkt_out[d] == '0, "only south used");
    if (busy_in[3]) begin
      held++;
      check(pkt_out[3] == '0, "nothing sent into a busy port");
    end
    if (pkt_valid(pkt_out[3])) begin
      pkt_t p;
      p = pkt_out[3];
      check(p[48:43] == 6'b0 && p.obj == 4'd4, "route spent, objective 4");
      if (p.wr) begin
        writes++;
        check({p.rd, p.wr, p.rr} == 3'b010 && p.body == {28'h5, 8'hAA}, "write packet");
      end else begin
        reads++;
        check({p.rd, p.wr, p.rr} == 3'b100 && p.body == {28'h5, 4'd0, 4'h0}, "read packet");
        // answer: read return from 4 to 0 arrives from the south, Y count spent
        fork begin
          pkt_t r;
          logic [7:0] d;
          d = 8'($urandom);
          repeat (3) @(negedge clk);
          r = '0; r.ydir = 1'b1; r.rr = 1'b1; r.obj = 4'd0; r.body = {d, 28'h0};
          pkt_in[3] = r;
          answer = d;
          @(negedge clk);
          pkt_in[3] = '0;
          repeat (6) @(negedge clk);
          check(test_leds == answer, "test_leds shows returned byte");
        end join_none
      end
    end
  end

  initial begin
    for (int d = 1; d <= 4; d++) begin pkt_in[d] = '0; busy_in[d] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk); nreset = 1;
    repeat (32 * 4 + 30) @(negedge clk);
    busy_in[3] = 1;              // stall across the next write slot
    repeat (20) @(negedge clk);
    busy_in[3] = 0;
    repeat (32 * 3) @(negedge clk);
    check(writes == 9 && reads == 9, $sformatf("writes %0d reads %0d", writes, reads));
    check(held > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
