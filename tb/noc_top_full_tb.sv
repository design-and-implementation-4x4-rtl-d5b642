// noc_top_full_tb: the mesh with every parameter at its default, run
// through complete write / read-back operations of all four masters
// (master 0 with slave 4, 1 with 12, 2 with 15, 3 with 7). Checks that each
// slave's LEDs show the byte its master wrote, that each master's LEDs show
// the same byte read back, and the round-trip time of the first read of
// each master against the hop count of its path: with no contention a
// read request leaves the core at cycle 5 of the loop and costs one cycle
// in the master adaptor, two per router on the way out and back (hops + 1
// routers each way), four at the slave (adaptor capture, read strobe, memory
// answer, return packet) and one to register the read return, so the return
// reaches the core 4*hops + 9 cycles after the request.
module noc_top_full_tb;
  logic clk = 0, nreset = 0;
  logic [3:0][7:0] test_leds, led_output;
  int checks = 0, failures = 0;
  int cyc = 0;
  int req_cyc [4], ret_cyc [4];
  logic m_rr [4], m_rq [4];
  localparam int HOPS [4] = '{1, 4, 4, 1};   // 0->4, 1->12, 2->15, 3->7

  noc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", msg, $time); end
  endtask

  for (genvar m = 0; m < 4; m++) begin : g_m
    assign m_rr[m] = dut.g_row[0].g_col[m].g_master.u_node.read_return;
    assign m_rq[m] = dut.g_row[0].g_col[m].g_master.u_node.read_request;
  end

  always @(posedge clk) if (nreset) begin
    cyc <= cyc + 1;
    for (int m = 0; m < 4; m++) begin
      if (m_rq[m] && req_cyc[m] < 0) req_cyc[m] = cyc;
      if (m_rr[m] && ret_cyc[m] < 0) ret_cyc[m] = cyc;
    end
  end

  initial begin
    for (int m = 0; m < 4; m++) begin req_cyc[m] = -1; ret_cyc[m] = -1; end
    repeat (3) @(posedge clk);
    @(negedge clk); nreset = 1;
    repeat (32 * 3) @(negedge clk);
    check(test_leds[0] == 8'hAA && test_leds[1] == 8'hBB &&
          test_leds[2] == 8'hDD && test_leds[3] == 8'hCC,
          $sformatf("master LEDs %h", test_leds));
    check(led_output[0] == 8'hAA && led_output[1] == 8'hCC &&
          led_output[2] == 8'hBB && led_output[3] == 8'hDD,
          $sformatf("slave LEDs %h", led_output));
    for (int m = 0; m < 4; m++) begin
      check(req_cyc[m] == 5, $sformatf("master %0d read at %0d", m, req_cyc[m]));
      check(ret_cyc[m] - req_cyc[m] == 4 * HOPS[m] + 9,
            $sformatf("master %0d round trip %0d cycles, %0d hops", m,
                      ret_cyc[m] - req_cyc[m], HOPS[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
